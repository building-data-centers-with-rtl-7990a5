// switch_node: one 2x2 photonic switching node of the memory network.
//
// Each node has four semiconductor optical amplifier (SOA) gates, one for each
// input-to-output path. Its routing logic samples the header wavelengths of
// both inputs: when an input shows a frame, the address bit of this node's
// stage (addr[STAGE]) picks the output, and if that output is free the matching
// SOA is turned on. The path then stays on, and the whole wavelength-striped
// message (header and payload) passes transparently, until the frame drops.
// The optical data path is represented here by its digital symbols: an output
// carries the signal of the input whose gate is on, and all zeros otherwise.
//
// Timing: the gate decision is registered, so a path opens one cycle after the
// frame arrives and closes one cycle after it leaves; the data path itself has
// no delay.
//
// The four SOAs, the frame and per-stage address bit follow the document. The
// contention rule is this design's choice: a path already held keeps its
// output, input 0 wins when both ask for a free output in the same cycle, and
// a losing input keeps asking while its frame is high and is reported in
// `blocked`.
module switch_node
  import ocm_pkg::*;
#(
  parameter int unsigned STAGE = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  net_sig_t [1:0]      in_sig,
  output net_sig_t [1:0]      out_sig,
  output logic [1:0][1:0]     gate,      // gate[i][o]: SOA from input i to output o on
  output logic [1:0]          blocked    // input i has a frame but no path
);

  logic [1:0][1:0] gate_n;
  logic [1:0]      blocked_n;

  always_comb begin
    gate_n    = gate;
    blocked_n = '0;
    for (int i = 0; i < 2; i++) begin
      if (!in_sig[i].hdr.frame) gate_n[i] = '0;
    end
    for (int i = 0; i < 2; i++) begin
      if (in_sig[i].hdr.frame && gate_n[i] == 2'b00) begin
        if (!(gate_n[0][in_sig[i].hdr.addr[STAGE]] || gate_n[1][in_sig[i].hdr.addr[STAGE]]))
          gate_n[i][in_sig[i].hdr.addr[STAGE]] = 1'b1;
        else
          blocked_n[i] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gate    <= '0;
      blocked <= '0;
    end else begin
      gate    <= gate_n;
      blocked <= blocked_n;
    end
  end

  always_comb begin
    for (int o = 0; o < 2; o++) begin
      out_sig[o] = NET_IDLE;
      for (int i = 0; i < 2; i++) begin
        if (gate[i][o]) out_sig[o] = out_sig[o] | in_sig[i];
      end
    end
  end

  // An output is driven by at most one input.
  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n)
    !(gate[0][0] && gate[1][0]) && !(gate[0][1] && gate[1][1]))
    else $error("switch_node: two inputs share one output");

endmodule
