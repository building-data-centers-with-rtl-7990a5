// net_ctrl: network control of the processor node.
//
// Drives the four low-speed header wavelengths (frame and address bits A0..A2)
// for the two lightpaths a memory transaction may need: the forward path from
// this node's own network port to the memory node, and the return path from
// the memory node's port back to this node. The memory node has no network
// logic of its own, so the return header is produced here too.
//
// The destination is latched when a path is requested and held unchanged while
// its frame is high. Route bits: A0 = 0 (the first stage is redundant in the
// 4x4 network), A1 = destination bit 1, A2 = destination bit 0. Headers are
// registered: a request shows on the header one cycle later.
//
// The frame-plus-three-address header and the memory controller owning all
// lightpath setup follow the document; the route encoding follows from the
// network wiring chosen in banyan_net.
module net_ctrl
  import ocm_pkg::*;
#(
  parameter int unsigned SRC_PORT = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fwd_on,    // hold forward lightpath to dst
  input  logic              ret_on,    // hold return lightpath from dst
  input  logic [PORT_W-1:0] dst,
  output header_t           hdr_fwd,   // header at this node's network input
  output header_t           hdr_ret,   // header at the memory node's network input
  output logic [PORT_W-1:0] ret_port   // where hdr_ret is applied
);

  function automatic logic [HDR_ADDR-1:0] route(logic [PORT_W-1:0] d);
    return {d[0], d[1], 1'b0};
  endfunction

  logic [PORT_W-1:0] fwd_dst, ret_src;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hdr_fwd  <= '0;
      hdr_ret  <= '0;
      fwd_dst  <= '0;
      ret_src  <= '0;
    end else begin
      if (fwd_on && !hdr_fwd.frame) fwd_dst <= dst;
      if (ret_on && !hdr_ret.frame) ret_src <= dst;
      hdr_fwd.frame <= fwd_on;
      hdr_fwd.addr  <= !fwd_on ? '0 : hdr_fwd.frame ? route(fwd_dst) : route(dst);
      hdr_ret.frame <= ret_on;
      hdr_ret.addr  <= ret_on ? route(PORT_W'(SRC_PORT)) : '0;
    end
  end

  assign ret_port = ret_src;

endmodule
