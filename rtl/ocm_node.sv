// ocm_node: one optically connected memory node.
//
// The node's FPGA is a local transceiver between the optical network and four
// commercial SDRAM chips. Received lane symbols are gathered into words by the
// SerDes, command and write words go to the OCM controller, which drives the
// SDRAM, and read words return through the SerDes onto the four payload
// lanes. The node drives no header wavelengths: lightpaths to and from it are
// set up by the processor's memory controller, so read data simply stream
// into the return lightpath that already exists.
//
// Latency through the node: one cycle of SerDes receive, the FIFO and SDRAM
// timing of ocm_ctrl, then one cycle of SerDes transmit.
//
// The node structure follows the document; the SDRAM chips themselves are
// outside this RTL and connect through `sd` / `sd_rdata`.
module ocm_node
  import ocm_pkg::*;
#(
  parameter int unsigned BURST_LEN  = 1024,
  parameter int unsigned FIFO_DEPTH = 32,
  parameter int unsigned T_RCD      = 4,
  parameter int unsigned CL         = 4,
  parameter int unsigned T_WR       = 4,
  parameter int unsigned T_RP       = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  lane_bus_t         rx_lanes,   // from the network output port
  output lane_bus_t         tx_lanes,   // to the network input port
  output sd_req_t           sd,
  input  logic [WORD_W-1:0] sd_rdata,
  output logic              busy,
  output logic              overflow,
  output logic              lane_err
);

  logic              rx_vld, rx_ctl, tx_vld, tx_ctl;
  logic [WORD_W-1:0] rx_data, tx_data;

  serdes u_serdes (
    .clk, .rst_n,
    .tx_vld, .tx_ctl, .tx_data, .tx_lanes,
    .rx_lanes, .rx_vld, .rx_ctl, .rx_data, .rx_lane_err(lane_err)
  );

  ocm_ctrl #(
    .BURST_LEN(BURST_LEN), .FIFO_DEPTH(FIFO_DEPTH),
    .T_RCD(T_RCD), .CL(CL), .T_WR(T_WR), .T_RP(T_RP)
  ) u_ctrl (
    .clk, .rst_n,
    .rx_vld, .rx_ctl, .rx_data,
    .tx_vld, .tx_ctl, .tx_data,
    .sd, .sd_rdata, .busy, .overflow
  );

endmodule
