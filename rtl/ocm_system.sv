// ocm_system: processor node, memory nodes and optical network together.
//
// A processor node reaches N_OCM optically connected memory nodes through a
// 4x4 circuit-switched network of 2x2 photonic switching nodes. Network port 0
// belongs to the processor node, port 1 is a spare port brought out to the
// pins, and memory node i sits at port 2 + i. Each transmitter reaches its
// network input through a fixed latency of LINK_DELAY cycles (transceiver
// logic plus time of flight); network outputs feed the receivers directly.
// The header that opens a return lightpath is produced by the processor node
// and applied at the network input of the memory node it names.
//
// One memory transaction moves a BURST_LEN-word burst. A write takes about
// SETUP_CYCLES + LINK_DELAY + BURST_LEN cycles on the link; a read adds the
// memory node's SDRAM latency and a second link traversal for the data.
//
// Outside this RTL and brought out as ports: the SDRAM chips of each memory
// node (`sd`, `sd_rdata`), and the spare network port (`spare_in`,
// `spare_out`). The port map and latency model are this design's choices;
// the node count, burst length and network size follow the document.
module ocm_system
  import ocm_pkg::*;
#(
  parameter int unsigned BURST_LEN    = 1024,
  parameter int unsigned N_OCM        = 2,
  parameter int unsigned LINK_DELAY   = 55,
  parameter int unsigned SETUP_CYCLES = 8
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // emulated processor control and verification counters
  input  logic                           keep_paths,
  input  logic                           start,
  input  logic                           clear,
  input  pattern_e                       pattern,
  input  logic [1:0]                     node_first,
  input  logic [2:0]                     node_count,
  input  logic [ADDR_W-COL_W-1:0]        burst_first,
  input  logic [ADDR_W-COL_W:0]          burst_count,
  output logic                           busy,
  output logic                           done,
  output logic [63:0]                    words_checked,
  output logic [63:0]                    bit_errors,
  output logic [63:0]                    word_errors,
  // SDRAM chips of the memory nodes
  output sd_req_t [N_OCM-1:0]            sd,
  input  logic [N_OCM-1:0][WORD_W-1:0]   sd_rdata,
  // spare network port
  input  net_sig_t                       spare_in,
  output net_sig_t                       spare_out,
  // status
  output logic                           setup_wait,
  output logic                           path_reuse,
  output logic                           mc_done,
  output logic [N_OCM-1:0]               ocm_busy,
  output logic [N_OCM-1:0]               ocm_overflow,
  output logic [N_OCM:0]                 lane_err,
  output logic [2:0][3:0]                net_blocked,
  output logic [2:0][3:0]                net_path_on
);

  localparam int unsigned N_PORTS  = 4;
  localparam int unsigned OCM_BASE = 2;

  net_sig_t [N_PORTS-1:0] port_in, port_out;
  net_sig_t               proc_tx, proc_tx_d;
  header_t                ret_hdr;
  logic [PORT_W-1:0]      ret_port;

  proc_node #(
    .BURST_LEN(BURST_LEN), .SETUP_CYCLES(SETUP_CYCLES),
    .SRC_PORT(0), .OCM_PORT_BASE(OCM_BASE)
  ) u_proc (
    .clk, .rst_n,
    .keep_paths, .start, .clear, .pattern, .node_first, .node_count, .burst_first, .burst_count,
    .busy, .done, .words_checked, .bit_errors, .word_errors,
    .net_tx(proc_tx), .net_rx_lanes(port_out[0].lanes),
    .ret_hdr, .ret_port,
    .setup_wait, .path_reuse, .mc_done, .lane_err(lane_err[0])
  );

  link_delay #(.DELAY(LINK_DELAY)) u_link_proc (
    .clk, .rst_n, .din(proc_tx), .dout(proc_tx_d)
  );

  assign port_in[0] = proc_tx_d;
  assign port_in[1] = spare_in;
  assign spare_out  = port_out[1];

  for (genvar p = OCM_BASE; p < N_PORTS; p++) begin : g_port
    if (p - OCM_BASE < N_OCM) begin : g_ocm
      localparam int unsigned I = p - OCM_BASE;
      net_sig_t tx, tx_d;

      ocm_node #(.BURST_LEN(BURST_LEN)) u_ocm (
        .clk, .rst_n,
        .rx_lanes (port_out[p].lanes),
        .tx_lanes (tx.lanes),
        .sd       (sd[I]),
        .sd_rdata (sd_rdata[I]),
        .busy     (ocm_busy[I]),
        .overflow (ocm_overflow[I]),
        .lane_err (lane_err[I+1])
      );
      assign tx.hdr = '0;

      link_delay #(.DELAY(LINK_DELAY)) u_link (
        .clk, .rst_n, .din(tx), .dout(tx_d)
      );

      assign port_in[p].lanes = tx_d.lanes;
      // the node drives no header of its own (tx_d.hdr stays idle)
      assign port_in[p].hdr   = tx_d.hdr | ((ret_port == PORT_W'(p)) ? ret_hdr : '0);
    end else begin : g_idle
      assign port_in[p] = NET_IDLE;
    end
  end

  banyan_net #(.N(N_PORTS)) u_net (
    .clk, .rst_n, .port_in, .port_out, .blocked(net_blocked), .path_on(net_path_on)
  );

endmodule
