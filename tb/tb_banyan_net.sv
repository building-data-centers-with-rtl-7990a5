// tb_banyan_net: every source reaches every destination through the three
// stages with route bits A1 = dst[1], A2 = dst[0] and either value of A0; the
// path opens three cycles after the frame; two sources to two different
// destinations can be connected at once when their paths do not collide, and
// a second source aimed at a busy destination is blocked.
module tb_banyan_net;
  import ocm_pkg::*;
  logic clk = 0, rst_n = 0;
  net_sig_t [3:0] port_in, port_out;
  logic [2:0][3:0] blocked, path_on;
  int checks = 0, failures = 0;

  banyan_net dut (.*);

  always #2 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic net_sig_t msg(int d, bit a0, logic [31:0] payload);
    net_sig_t m;
    m = '0;
    m.hdr.frame = 1'b1;
    m.hdr.addr  = {d[0], d[1], a0};
    for (int l = 0; l < 4; l++) begin
      m.lanes[l].vld  = 1'b1;
      m.lanes[l].data = payload[8*l +: 8];
    end
    return m;
  endfunction

  initial begin
    net_sig_t m, m2;
    port_in = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      for (int d = 0; d < 4; d++) begin
        for (int a0 = 0; a0 < 2; a0++) begin
          @(negedge clk);
          m = msg(d, a0[0], $urandom);
          port_in[s] = m;
          for (int c = 1; c <= 3; c++) begin
            @(negedge clk);
            if (c < 3) chk(port_out == '0, "path not open before 3 cycles");
          end
          for (int p = 0; p < 4; p++)
            chk(port_out[p] == ((p == d) ? m : NET_IDLE), $sformatf("s%0d d%0d a0=%0d port %0d", s, d, a0, p));
          port_in = '0;
          repeat (4) @(negedge clk);
          chk(port_out == '0 && path_on == '0, "teardown");
        end
      end
    end
    // processor (0) -> memory (2) together with memory (2) -> processor (0)
    @(negedge clk);
    m = msg(2, 0, 32'hCAFE_0002); m2 = msg(0, 0, 32'hBEEF_0000);
    port_in[0] = m; port_in[2] = m2;
    repeat (4) @(negedge clk);
    chk(port_out[2] == m && port_out[0] == m2, "two concurrent lightpaths");
    // port 1 aims at destination 2, which is taken
    port_in[1] = msg(2, 0, 32'h1);
    repeat (4) @(negedge clk);
    chk(|blocked && port_out[2] == m, "busy destination blocks the newcomer");
    port_in = '0;
    repeat (5) @(negedge clk);
    chk(port_out == '0, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
