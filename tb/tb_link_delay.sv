// tb_link_delay: random port signals must reappear exactly DELAY cycles later.
module tb_link_delay;
  import ocm_pkg::*;
  localparam int unsigned D = 7;
  logic clk = 0, rst_n = 0;
  net_sig_t din, dout;
  net_sig_t hist [$];
  int checks = 0, failures = 0;

  link_delay #(.DELAY(D)) dut (.*);

  always #2 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    din = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      // dout now shows what was applied D cycles ago (idle before that)
      checks++;
      if (dout !== ((hist.size() >= D) ? hist[hist.size()-D] : NET_IDLE)) begin
        failures++; $display("FAIL cycle %0d", n);
      end
      din = net_sig_t'({$urandom, $urandom});
      hist.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
