// tb_ocm_system: end-to-end test of the whole system at its default sizes
// (1024-word bursts, two memory nodes, 55-cycle links), with an SDRAM model on
// each memory node.
//
// The emulated processor fills two bursts of both memory nodes with each of
// the four patterns and reads them back; every pass must verify all words
// without error. A fifth pass corrupts two bits of one stored word between the
// write and the read pass and must count exactly two bit errors. Two more
// passes hold the lightpaths between bursts (keep_paths): three bursts on each
// node, where paths are set up only when the node changes, and a 24-burst
// back-to-back fill of one node, which must not pile up write data in the
// memory node's FIFO. Timing checks, counted from the command word: a write
// transaction ends 1 + BURST_LEN cycles later, a read 2 * LINK +
// (T_RCD + CL + 4) + BURST_LEN + 3 cycles later (command out, two link
// traversals, node latency, data); each SDRAM sees 1024 back-to-back writes
// (one word per 250 MHz cycle). Every mechanism must occur at least once:
// write and read transactions, the setup stall, reuse of held lightpaths and
// their drop on a change of node, a read with the forward lightpath already
// torn down while the return path carries data, accesses to both memory nodes,
// a lightpath through all three network stages, write data buffered in a
// memory node while its row opens, and error detection.
module tb_ocm_system;
  import ocm_pkg::*;
  localparam int unsigned BL = 1024, LINK = 55, SC = 8, TRCD = 4, CLAT = 4;
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
  longint unsigned cyc = 0;

  ocm_system dut (.*);

  sdram_model #(.CL(CLAT), .T_RCD(TRCD)) mem0 (.clk, .sd(sd[0]), .rdata(sd_rdata[0]));
  sdram_model #(.CL(CLAT), .T_RCD(TRCD)) mem1 (.clk, .sd(sd[1]), .rdata(sd_rdata[1]));

  always #2 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // mechanism counters
  int n_wr_txn = 0, n_rd_txn = 0, n_setup = 0, n_rd_fwd_down = 0, n_stage3 = 0;
  int n_buffered = 0, n_pass = 0, n_err_pass = 0, n_reuse = 0, n_drop = 0, max_fifo = 0;
  longint unsigned t_start = 0;
  bit cur_write, prev_setup = 0, prev_reuse = 0;

  always @(negedge clk) begin
    if (setup_wait && !prev_setup) n_setup++;
    prev_setup = setup_wait;
    if (path_reuse && !prev_reuse) n_reuse++;
    prev_reuse = path_reuse;
    if (dut.u_proc.u_mc.state == 3'd6) n_drop++;
    // transaction time measured from the command word
    if (dut.u_proc.u_mc.state == 3'd2) begin
      t_start   = cyc;
      cur_write = dut.u_proc.u_mc.is_write;
    end
    if (mc_done) begin
      if (cur_write) begin
        n_wr_txn++;
        chk(cyc - t_start == 1 + BL, $sformatf("write transaction %0d cycles", cyc - t_start));
      end else begin
        n_rd_txn++;
        chk(cyc - t_start == 2 * LINK + (TRCD + CLAT + 4) + BL + 3,
            $sformatf("read transaction %0d cycles", cyc - t_start));
      end
    end
    for (int i = 0; i < 2; i++) begin
      int occ;
      occ = (i == 0) ? int'(dut.g_port[2].g_ocm.u_ocm.u_ctrl.wr_ptr - dut.g_port[2].g_ocm.u_ocm.u_ctrl.rd_ptr)
                     : int'(dut.g_port[3].g_ocm.u_ocm.u_ctrl.wr_ptr - dut.g_port[3].g_ocm.u_ocm.u_ctrl.rd_ptr);
      occ = occ & 63;
      if (occ > max_fifo) max_fifo = occ;
    end
    // return lightpath carrying data with the forward header already down
    if (!dut.port_in[0].hdr.frame && dut.port_out[0].lanes[0].vld) n_rd_fwd_down++;
    if (|net_path_on[2]) n_stage3++;
    if ((dut.g_port[2].g_ocm.u_ocm.u_ctrl.state == 3'd2 && !dut.g_port[2].g_ocm.u_ocm.u_ctrl.fifo_empty) ||
        (dut.g_port[3].g_ocm.u_ocm.u_ctrl.state == 3'd2 && !dut.g_port[3].g_ocm.u_ocm.u_ctrl.fifo_empty))
      n_buffered++;
    chk(spare_out == NET_IDLE, "spare port untouched");
  end

  task automatic run(pattern_e p, int b0, bit corrupt, int nodes = 2, int bursts = 2);
    int guard = 0;
    @(negedge clk);
    pattern = p; node_first = 0; node_count = 3'(nodes); burst_first = 15'(b0); burst_count = 16'(bursts);
    start = 1; clear = 1; @(negedge clk); start = 0; clear = 0;
    if (corrupt) begin
      while (dut.u_proc.u_cpu.phase_wr && guard < 100000) begin @(negedge clk); guard++; end
      mem1.flip(b0 * BL + 77, 3);
      mem1.flip(b0 * BL + 77, 30);
    end
    while (busy && guard < 150000) begin @(negedge clk); guard++; end
    chk(!busy, "pass finished");
    chk(words_checked == nodes * bursts * BL, $sformatf("words checked %0d", words_checked));
    chk(bit_errors == (corrupt ? 2 : 0) && word_errors == (corrupt ? 1 : 0),
        $sformatf("pattern %0d: %0d bit errors", p, bit_errors));
    if (corrupt && bit_errors == 2) n_err_pass++;
    if (!corrupt && bit_errors == 0 && words_checked == nodes * bursts * BL) n_pass++;
  endtask

  initial begin
    start = 0; clear = 0; pattern = PAT_ONES; node_first = 0; node_count = 0; burst_first = 0; burst_count = 0;
    spare_in = NET_IDLE;
    repeat (3) @(posedge clk); rst_n = 1;
    run(PAT_ONES, 0, 0);
    run(PAT_ZEROS, 2, 0);
    run(PAT_PRBS, 100, 0);
    run(PAT_ADDR, 32766, 0);
    run(PAT_PRBS, 7, 1);
    // pre-allocated lightpaths: setup only when the node changes (5 of 60 transactions)
    keep_paths = 1;
    run(PAT_ADDR, 200, 0, 2, 3);
    // long back-to-back fill of one node on held lightpaths (tightest spacing)
    run(PAT_PRBS, 1000, 0, 1, 24);
    keep_paths = 0;
    repeat (LINK + 5) @(negedge clk);
    chk(!dut.port_in[0].hdr.frame, "held lightpaths released");
    chk(n_pass == 6, "all four patterns verified");
    chk(n_err_pass == 1, "error detection");
    chk(n_wr_txn == 20 + 6 + 24 && n_rd_txn == 20 + 6 + 24, $sformatf("%0d writes, %0d reads", n_wr_txn, n_rd_txn));
    chk(n_setup == 40 + 4 + 1, $sformatf("%0d setup stalls", n_setup));
    chk(n_reuse == 2 * (2 * 3 + 24) - 5, $sformatf("%0d transactions on held lightpaths", n_reuse));
    chk(n_drop > 0, "held lightpaths dropped on a change of node");
    chk(max_fifo <= 16, $sformatf("memory-node FIFO peak %0d entries", max_fifo));
    chk(n_rd_fwd_down > 0, "read data on the return path after forward teardown");
    chk(mem0.n_wr > 0 && mem1.n_wr > 0 && mem0.n_rd > 0 && mem1.n_rd > 0, "both memory nodes used");
    chk(n_stage3 > 0, "three-stage lightpaths");
    chk(n_buffered > 0, "write data buffered while the row opens");
    chk(mem0.max_wr_run == BL && mem1.max_wr_run == BL, "one word per cycle into the SDRAM");
    chk(mem0.violations == 0 && mem1.violations == 0, "SDRAM protocol");
    chk(ocm_overflow == 0 && lane_err == 0 && net_blocked == 0, "no overflow, lane error or blocking");
    $display("mechanisms: writes=%0d reads=%0d setup_stalls=%0d path_reuses=%0d drops=%0d fwd_down_read_cycles=%0d stage3_cycles=%0d buffered_cycles=%0d error_passes=%0d fifo_peak=%0d",
             n_wr_txn, n_rd_txn, n_setup, n_reuse, n_drop, n_rd_fwd_down, n_stage3, n_buffered, n_err_pass, max_fifo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
