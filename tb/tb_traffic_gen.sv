// tb_traffic_gen: the emulated processor against a memory controller stand-in
// that keeps written words in a local array. For each of the four patterns it
// checks the order of requests (all writes, then all reads, nodes outer,
// bursts inner), every written word against a pattern computed here (the PRBS
// by a bit-serial LFSR), and the verification counters; then it corrupts four
// bits in three read words and expects bit_errors = 4 and word_errors = 3,
// and a further pass without `clear` must add to the counters.
module tb_traffic_gen;
  import ocm_pkg::*;
  localparam int unsigned BL = 8;
  logic clk = 0, rst_n = 0;
  logic start, clear; pattern_e pattern; logic [1:0] node_first; logic [2:0] node_count;
  logic [14:0] burst_first; logic [15:0] burst_count;
  logic busy, done; logic [63:0] words_checked, bit_errors, word_errors;
  logic req_valid, req_ready, req_write; logic [1:0] req_port; logic [24:0] req_addr;
  logic wr_go, wr_valid, wr_ready, rd_go, rd_valid, mc_done;
  logic [31:0] wr_data, rd_data;
  int checks = 0, failures = 0;

  traffic_gen #(.BURST_LEN(BL), .OCM_PORT_BASE(2)) dut (.*);

  always #2 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic [31:0] store [int unsigned];
  logic [30:0] lfsr;
  function automatic logic [31:0] prbs_word();
    logic [31:0] w;
    for (int i = 31; i >= 0; i--) begin
      w[i] = lfsr[30] ^ lfsr[27];
      lfsr = {lfsr[29:0], w[i]};
    end
    return w;
  endfunction

  function automatic logic [31:0] pat_word(pattern_e p, int node, int a);
    case (p)
      PAT_ONES:  return '1;
      PAT_ZEROS: return '0;
      PAT_PRBS:  return prbs_word();
      default:   return {2'(node), 5'b0, 25'(a)};
    endcase
  endfunction

  // one transaction as the memory controller would run it
  task automatic serve(bit exp_write, int exp_node, int exp_burst, pattern_e p,
                       ref int corrupt_left);
    int n = 0, guard = 0;
    while (!req_valid && guard < 100) begin @(negedge clk); guard++; end
    chk(req_valid && req_write == exp_write && req_port == 2'(2 + exp_node) &&
        req_addr == 25'(exp_burst * 1024), $sformatf("request w=%0d node=%0d burst=%0d", exp_write, exp_node, exp_burst));
    req_ready = 1; @(negedge clk); req_ready = 0;
    repeat (3) @(negedge clk);
    if (exp_write) begin
      wr_go = 1;
      while (n < BL) begin
        wr_ready = ($urandom % 4 != 0) || wr_go;
        #1;
        if (wr_ready && wr_valid) begin
          int a = exp_burst * 1024 + n;
          chk(wr_data == pat_word(p, exp_node, a), "write data pattern");
          store[exp_node * 2**25 + a] = wr_data;
          n++;
        end
        @(negedge clk); wr_go = 0; wr_ready = 0;
      end
    end else begin
      rd_go = 1; @(negedge clk); rd_go = 0;
      while (n < BL) begin
        rd_valid = ($urandom % 3 != 0);
        if (rd_valid) begin
          rd_data = store[exp_node * 2**25 + exp_burst * 1024 + n];
          if (corrupt_left > 0 && n == 3) begin
            rd_data ^= (corrupt_left == 2) ? 32'h0000_0101 : 32'h8000_0000;
            corrupt_left--;
          end
          n++;
        end
        @(negedge clk); rd_valid = 0;
      end
    end
    mc_done = 1; @(negedge clk); mc_done = 0;
  endtask

  int acc_words = 0, acc_bits = 0, acc_wordsbad = 0;
  task automatic run(pattern_e p, int corrupt, bit clr = 1);
    int cl = corrupt;
    @(negedge clk);
    pattern = p; node_first = 0; node_count = 2; burst_first = 5; burst_count = 2;
    start = 1; clear = clr; @(negedge clk); start = 0; clear = 0;
    if (clr) begin acc_words = 0; acc_bits = 0; acc_wordsbad = 0; end
    acc_words += 4 * BL; acc_bits += (corrupt != 0) ? 4 : 0; acc_wordsbad += (corrupt != 0) ? 3 : 0;
    chk(busy, "busy after start");
    lfsr = '1;
    for (int nd = 0; nd < 2; nd++) for (int b = 5; b < 7; b++) serve(1, nd, b, p, cl);
    for (int nd = 0; nd < 2; nd++) for (int b = 5; b < 7; b++) serve(0, nd, b, p, cl);
    @(negedge clk);
    chk(!busy, "idle after the read pass");
    chk(words_checked == acc_words, $sformatf("words checked %0d", words_checked));
    chk(bit_errors == acc_bits, $sformatf("bit errors %0d", bit_errors));
    chk(word_errors == acc_wordsbad, $sformatf("word errors %0d", word_errors));
  endtask

  always @(posedge clk) if (done) checks++;  // done pulse seen

  initial begin
    start = 0; clear = 0; pattern = PAT_ONES; node_first = 0; node_count = 0; burst_first = 0; burst_count = 0;
    req_ready = 0; wr_go = 0; wr_ready = 0; rd_go = 0; rd_valid = 0; rd_data = 0; mc_done = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    run(PAT_ONES, 0);
    run(PAT_ZEROS, 0);
    run(PAT_PRBS, 0);
    run(PAT_ADDR, 0);
    run(PAT_PRBS, 3);
    run(PAT_ADDR, 3, 0);   // counters keep adding up without clear
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
