// tb_net_ctrl: header wavelengths for forward and return lightpaths.
// Route bits expected: A0 = 0, A1 = destination bit 1, A2 = destination bit 0.
module tb_net_ctrl;
  import ocm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic fwd_on, ret_on; logic [1:0] dst;
  header_t hdr_fwd, hdr_ret; logic [1:0] ret_port;
  int checks = 0, failures = 0;

  net_ctrl #(.SRC_PORT(0)) dut (.*);

  always #2 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    fwd_on = 0; ret_on = 0; dst = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int d = 0; d < 4; d++) begin
      for (int rd = 0; rd < 2; rd++) begin
        @(negedge clk);
        fwd_on = 1; ret_on = rd[0]; dst = 2'(d);
        chk(!hdr_fwd.frame && !hdr_ret.frame, "no frame before request");
        @(negedge clk);
        chk(hdr_fwd.frame && hdr_fwd.addr == {d[0], d[1], 1'b0}, $sformatf("fwd route d=%0d", d));
        chk(hdr_ret.frame == rd[0], "return frame");
        if (rd) chk(hdr_ret.addr == 3'b000 && ret_port == 2'(d), "return route to port 0");
        // destination held while the frame is up
        dst = 2'(d + 1);
        @(negedge clk);
        chk(hdr_fwd.addr == {d[0], d[1], 1'b0} && (!rd || ret_port == 2'(d)), "route held");
        // forward teardown first, return kept
        fwd_on = 0;
        @(negedge clk);
        chk(!hdr_fwd.frame && hdr_fwd.addr == 0 && hdr_ret.frame == rd[0], "forward teardown");
        ret_on = 0;
        @(negedge clk);
        chk(!hdr_ret.frame, "return teardown");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
