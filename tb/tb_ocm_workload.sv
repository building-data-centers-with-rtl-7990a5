// tb_ocm_workload: the fill-and-verify workload of the demonstration system,
// run on the whole design at its default sizes (1024-word bursts, two 128 MB
// memory nodes, 55-cycle links).
//
// The emulated processor fills memory with each of the four patterns in turn
// and reads it back, and the error counters are cleared only once, so at the
// end they hold one effective memory bit-error figure over all four patterns.
// Filling a whole node (32768 bursts) takes about 70 million cycles, too long
// to simulate, so each pattern covers three regions of four bursts on both
// nodes, chosen where the address fields roll over:
//   bursts  4094 ..  4097  row 4095 -> row 0 of the next bank
//   bursts 16382 .. 16385  bank 3 of chip pair 0 -> bank 0 of chip pair 1
//   bursts 32764 .. 32767  the last rows of the node
// Checks: every pass verifies all its words with no bit error; the counters
// add up over the passes; each memory node ends up holding exactly as many
// distinct words as were written to it (no two addresses land on the same
// SDRAM location); and the SDRAM models see no protocol violation and full
// 1024-word write runs.
module tb_ocm_workload;
  import ocm_pkg::*;
  localparam int unsigned BL = 1024, BURSTS = 4, NODES = 2;
  localparam int unsigned REGION [3] = '{4094, 16382, 32764};
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // asynchronous reset edge before the first clock
  logic start, clear; pattern_e pattern; logic [1:0] node_first; logic [2:0] node_count;
  logic [14:0] burst_first; logic [15:0] burst_count;
  logic busy, done; logic [63:0] words_checked, bit_errors, word_errors;
  sd_req_t [1:0] sd; logic [1:0][31:0] sd_rdata;
  net_sig_t spare_in, spare_out;
  logic setup_wait, path_reuse, mc_done;
  logic keep_paths = 1'b0; logic [1:0] ocm_busy, ocm_overflow; logic [2:0] lane_err;
  logic [2:0][3:0] net_blocked, net_path_on;
  int checks = 0, failures = 0;

  ocm_system dut (.*);

  sdram_model mem0 (.clk, .sd(sd[0]), .rdata(sd_rdata[0]));
  sdram_model mem1 (.clk, .sd(sd[1]), .rdata(sd_rdata[1]));

  always #2 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  longint unsigned expected_words = 0;

  task automatic run(pattern_e p, int unsigned b0, bit clr);
    int guard = 0;
    longint unsigned prior;
    @(negedge clk);
    pattern = p; node_first = 0; node_count = 3'(NODES);
    burst_first = 15'(b0); burst_count = 16'(BURSTS);
    start = 1; clear = clr; @(negedge clk); start = 0; clear = 0;
    prior = clr ? 0 : expected_words;
    while (busy && guard < 200000) begin @(negedge clk); guard++; end
    chk(!busy, "pass finished");
    expected_words = prior + NODES * BURSTS * BL;
    chk(words_checked == expected_words,
        $sformatf("pattern %0d region %0d: %0d words checked, %0d expected", p, b0, words_checked, expected_words));
    chk(bit_errors == 0 && word_errors == 0,
        $sformatf("pattern %0d region %0d: %0d bit errors", p, b0, bit_errors));
  endtask

  initial begin
    bit first = 1;
    start = 0; clear = 0; pattern = PAT_ONES; node_first = 0; node_count = 0; burst_first = 0; burst_count = 0;
    spare_in = NET_IDLE;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int p = 0; p < 4; p++)
      for (int r = 0; r < 3; r++) begin
        run(pattern_e'(p), REGION[r], first);
        first = 0;
      end
    chk(words_checked == 64'(4 * 3 * NODES * BURSTS * BL), "counters add up over all four patterns");
    chk(mem0.mem.num() == 3 * BURSTS * BL && mem1.mem.num() == 3 * BURSTS * BL,
        $sformatf("distinct words stored: %0d and %0d", mem0.mem.num(), mem1.mem.num()));
    chk(mem0.violations == 0 && mem1.violations == 0, "SDRAM protocol");
    chk(mem0.max_wr_run == int'(BL) && mem1.max_wr_run == int'(BL), "1024-word write runs");
    chk(ocm_overflow == 0 && lane_err == 0, "no FIFO overflow or lane error");
    $display("workload: %0d bits verified over four patterns, %0d bit errors",
             words_checked * 32, bit_errors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
