// proc_node: the processor node.
//
// One FPGA holding the emulated processor (traffic_gen) and the custom memory
// controller, itself made of memory control (mem_ctrl), network control
// (net_ctrl) and the SerDes. The node has no local memory: every access goes
// over the 4 x 2.5 Gb/s optical link. Its network port carries the forward
// header together with the payload lanes; the return-path header, which opens
// the lightpath from a memory node back to this node, leaves on `ret_hdr` with
// the port it must be applied at (`ret_port`).
//
// Interface: configuration and verification counters of the traffic
// generator, the network port (`net_tx` out, `net_rx_lanes` in), and status:
// `setup_wait` is high while the processor is stalled for lightpath setup;
// `keep_paths` selects pre-allocated lightpaths (see mem_ctrl) and
// `path_reuse` marks a request served without setup.
//
// The partition follows the document's processor-node diagram; all timing
// comes from the blocks inside.
module proc_node
  import ocm_pkg::*;
#(
  parameter int unsigned BURST_LEN     = 1024,
  parameter int unsigned SETUP_CYCLES  = 8,
  parameter int unsigned SRC_PORT      = 0,
  parameter int unsigned OCM_PORT_BASE = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // emulated processor
  input  logic              keep_paths,
  input  logic              start,
  input  logic              clear,
  input  pattern_e          pattern,
  input  logic [1:0]        node_first,
  input  logic [2:0]        node_count,
  input  logic [ADDR_W-COL_W-1:0] burst_first,
  input  logic [ADDR_W-COL_W:0]   burst_count,
  output logic              busy,
  output logic              done,
  output logic [63:0]       words_checked,
  output logic [63:0]       bit_errors,
  output logic [63:0]       word_errors,
  // network
  output net_sig_t          net_tx,
  input  lane_bus_t         net_rx_lanes,
  output header_t           ret_hdr,
  output logic [PORT_W-1:0] ret_port,
  // status
  output logic              setup_wait,
  output logic              path_reuse,
  output logic              mc_done,
  output logic              lane_err
);

  logic              req_valid, req_ready, req_write;
  logic [PORT_W-1:0] req_port;
  logic [ADDR_W-1:0] req_addr;
  logic              wr_go, wr_valid, wr_ready, rd_go, rd_valid;
  logic [WORD_W-1:0] wr_data, rd_data;
  logic              fwd_on, ret_on;
  logic [PORT_W-1:0] dst;
  logic              tx_vld, tx_ctl, rx_vld, rx_ctl;
  logic [WORD_W-1:0] tx_data, rx_data;

  traffic_gen #(.BURST_LEN(BURST_LEN), .OCM_PORT_BASE(OCM_PORT_BASE)) u_cpu (
    .clk, .rst_n,
    .start, .clear, .pattern, .node_first, .node_count, .burst_first, .burst_count,
    .busy, .done, .words_checked, .bit_errors, .word_errors,
    .req_valid, .req_ready, .req_write, .req_port, .req_addr,
    .wr_go, .wr_valid, .wr_ready, .wr_data,
    .rd_go, .rd_valid, .rd_data, .mc_done
  );

  mem_ctrl #(.BURST_LEN(BURST_LEN), .SETUP_CYCLES(SETUP_CYCLES)) u_mc (
    .clk, .rst_n, .keep_paths,
    .req_valid, .req_ready, .req_write, .req_port, .req_addr,
    .wr_go, .wr_valid, .wr_ready, .wr_data,
    .rd_go, .rd_valid, .rd_data, .done(mc_done), .setup_wait, .path_reuse,
    .fwd_on, .ret_on, .dst,
    .tx_vld, .tx_ctl, .tx_data, .rx_vld, .rx_ctl, .rx_data
  );

  net_ctrl #(.SRC_PORT(SRC_PORT)) u_net (
    .clk, .rst_n, .fwd_on, .ret_on, .dst,
    .hdr_fwd(net_tx.hdr), .hdr_ret(ret_hdr), .ret_port
  );

  serdes u_serdes (
    .clk, .rst_n,
    .tx_vld, .tx_ctl, .tx_data, .tx_lanes(net_tx.lanes),
    .rx_lanes(net_rx_lanes), .rx_vld, .rx_ctl, .rx_data, .rx_lane_err(lane_err)
  );

endmodule
