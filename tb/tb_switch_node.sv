// tb_switch_node: path setup, pass-through, teardown and contention of one
// 2x2 switching node (stage 1, so header address bit 1 routes).
module tb_switch_node;
  import ocm_pkg::*;
  logic clk = 0, rst_n = 0;
  net_sig_t [1:0] in_sig, out_sig;
  logic [1:0][1:0] gate;
  logic [1:0] blocked;
  int checks = 0, failures = 0;

  switch_node #(.STAGE(1)) dut (.*);

  always #2 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic net_sig_t msg(bit frame, bit out_sel, logic [31:0] payload);
    net_sig_t m;
    m = '0;
    m.hdr.frame   = frame;
    m.hdr.addr    = {$urandom % 2 == 1, out_sel, $urandom % 2 == 1};
    for (int l = 0; l < 4; l++) begin
      m.lanes[l].vld  = 1'b1;
      m.lanes[l].data = payload[8*l +: 8];
    end
    return m;
  endfunction

  initial begin
    net_sig_t m0, m1;
    in_sig = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    // input 0 -> output 1, input 1 -> output 0 at the same time
    @(negedge clk);
    m0 = msg(1, 1, 32'h1111_0000); m1 = msg(1, 0, 32'h2222_0000);
    in_sig[0] = m0; in_sig[1] = m1;
    chk(out_sig[0] == NET_IDLE && out_sig[1] == NET_IDLE, "no path before the decision");
    @(negedge clk);
    chk(gate == 4'b0110, "gates 0->1 and 1->0");
    chk(out_sig[1] == m0 && out_sig[0] == m1, "cross pass-through");
    // payload changes pass without delay
    m0.lanes[2].data = 8'hA5; in_sig[0] = m0; #1;
    chk(out_sig[1] == m0, "transparent data path");
    // frame drop closes the path one cycle later
    in_sig[0].hdr.frame = 0;
    @(negedge clk);
    chk(gate[0] == 2'b00 && out_sig[1] == NET_IDLE, "teardown");
    in_sig = '0;
    @(negedge clk);
    // contention: both want output 0 in the same cycle; input 0 wins
    m0 = msg(1, 0, 32'h3333_3333); m1 = msg(1, 0, 32'h4444_4444);
    in_sig[0] = m0; in_sig[1] = m1;
    @(negedge clk);
    chk(gate == 4'b0001 && out_sig[0] == m0 && out_sig[1] == NET_IDLE, "input 0 wins tie");
    chk(blocked == 2'b10, "input 1 blocked");
    // held path keeps its output even when input 1 retries
    repeat (3) @(negedge clk);
    chk(gate == 4'b0001 && blocked == 2'b10, "held path kept");
    // input 0 releases: input 1 gets the output
    in_sig[0] = '0;
    @(negedge clk);
    @(negedge clk);
    chk(gate == 4'b0100 && out_sig[0] == m1 && blocked == 2'b00, "blocked input gets output");
    // input 0 now asks for output 0 while input 1 holds it
    in_sig[0] = msg(1, 0, 32'h5555_5555);
    @(negedge clk);
    chk(blocked == 2'b01 && out_sig[0] == m1, "late requester blocked");
    in_sig = '0;
    @(negedge clk); @(negedge clk);
    chk(gate == 4'b0000 && out_sig == '0, "all idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
