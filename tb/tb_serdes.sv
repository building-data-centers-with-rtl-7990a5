// tb_serdes: checks lane striping and gathering of the SerDes parallel side.
// Random words are sent; each lane must carry byte l of the word one cycle
// later with the word's flags. The lanes are looped back and the gathered word
// must match one further cycle later. Lane-flag mismatches must raise
// rx_lane_err.
module tb_serdes;
  import ocm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic tx_vld, tx_ctl; logic [31:0] tx_data;
  lane_bus_t tx_lanes, rx_lanes;
  logic rx_vld, rx_ctl, rx_lane_err; logic [31:0] rx_data;
  int checks = 0, failures = 0;

  serdes dut (.*);

  always #2 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    logic [31:0] w; logic v, c;
    tx_vld = 0; tx_ctl = 0; tx_data = 0; rx_lanes = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      w = $urandom; v = ($urandom % 4) != 0; c = $urandom % 2;
      tx_vld = v; tx_ctl = c; tx_data = w;
      @(negedge clk);   // one cycle later the lanes hold the symbols
      for (int l = 0; l < 4; l++) begin
        chk(tx_lanes[l].vld == v, "lane vld");
        chk(tx_lanes[l].ctl == (v & c), "lane ctl");
        chk(tx_lanes[l].data == (v ? w[8*l +: 8] : 8'h00), $sformatf("lane %0d data", l));
      end
      rx_lanes = tx_lanes;
      @(negedge clk);
      chk(rx_vld == v && rx_ctl == (v & c) && (!v || rx_data == w) && !rx_lane_err, "gather");
    end
    // lane misalignment: one lane without valid
    @(negedge clk);
    rx_lanes = '0; rx_lanes[0].vld = 1; rx_lanes[1].vld = 1; rx_lanes[2].vld = 1;
    @(negedge clk);
    chk(rx_lane_err && !rx_vld, "lane error flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
