// tb_mem_ctrl: memory controller flow for one write and one read burst.
// Checks: the setup stall lasts SETUP_CYCLES, the command word goes out once
// with the control flag and the right operation and address, write data follow
// on the same lanes in order, a gap-free write burst takes exactly
// SETUP_CYCLES + 1 + BURST_LEN + 1 cycles, the forward lightpath is dropped
// right after a read command while the return path stays up until BURST_LEN
// read words have arrived, and control words on the receive side are ignored.
// Then the pre-allocated lightpath mode: setup skipped on reuse, paths dropped
// on a change of node or when the mode is released; and at least BURST_GAP
// idle cycles between the last word of a write burst and the next command.
module tb_mem_ctrl;
  import ocm_pkg::*;
  localparam int unsigned BL = 16, SC = 5, GAP = 14;
  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, req_write; logic [1:0] req_port; logic [24:0] req_addr;
  logic wr_go, wr_valid, wr_ready, rd_go, rd_valid, done, setup_wait, keep_paths, path_reuse;
  logic [31:0] wr_data, rd_data, tx_data, rx_data;
  logic fwd_on, ret_on, tx_vld, tx_ctl, rx_vld, rx_ctl; logic [1:0] dst;
  int checks = 0, failures = 0;

  mem_ctrl #(.BURST_LEN(BL), .SETUP_CYCLES(SC)) dut (.*);

  always #2 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // spacing between the last write word of a burst and the next command word
  longint unsigned cyc_n = 0, last_wdata = 0;
  int n_gaps = 0, min_gap = 1 << 30;
  bit after_write = 0;
  always @(negedge clk) begin
    cyc_n++;
    #1;
    if (tx_vld && !tx_ctl && wr_ready) begin last_wdata = cyc_n; after_write = 1; end
    if (tx_vld && tx_ctl && after_write) begin
      n_gaps++;
      if (int'(cyc_n - last_wdata - 1) < min_gap) min_gap = int'(cyc_n - last_wdata - 1);
      after_write = 0;
    end
  end

  task automatic chk(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // write burst; gaps = 1 inserts random idle cycles in the write stream
  task automatic do_write(logic [24:0] a, logic [1:0] p, bit gaps, output int cycles,
                          input int exp_setup = SC, input bit kept = 0);
    int n_setup = 0, n_cmd = 0, idx = 0, n_go = 0, n_reuse = 0;
    cycles = 0;
    @(negedge clk);
    req_valid = 1; req_write = 1; req_port = p; req_addr = a;
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    if (path_reuse) n_reuse++;
    @(negedge clk);
    req_valid = 0;
    while (!done) begin
      cycles++;
      if (setup_wait) begin n_setup++; chk(fwd_on && (ret_on == keep_paths) && dst == p, "forward setup"); end
      if (tx_vld && tx_ctl) begin
        n_cmd++;
        chk(tx_data == {OP_WRITE, 5'b0, a}, "write command word");
      end
      if (wr_go) n_go++;
      wr_valid = wr_ready && (!gaps || ($urandom % 3 != 0));
      wr_data  = 32'hA000_0000 + idx;
      #1;
      if (wr_valid) begin
        chk(tx_vld && !tx_ctl && tx_data == wr_data, "write word on lanes");
        idx++;
      end
      @(negedge clk);
      wr_valid = 0;
      if (cycles > 1000) break;
    end
    cycles++;
    // a setup may be stretched by the spacing that follows a write burst
    chk(exp_setup == 0 ? n_setup == 0 : n_setup >= exp_setup, $sformatf("setup stall %0d cycles", n_setup));
    chk(n_reuse == (exp_setup == 0), "path reuse flagged");
    chk(n_cmd == 1 && n_go == 1, "one command word, one go");
    chk(idx == BL, "BURST_LEN words streamed");
    chk(fwd_on == kept, "forward path state in the teardown cycle");
    @(negedge clk);
    chk(fwd_on == kept && ret_on == kept && (kept || req_ready), "torn down or kept");
  endtask

  initial begin
    int cyc, n_rd, n_fwd_after_cmd;
    bit cmd_seen;
    req_valid = 0; req_write = 0; req_port = 0; req_addr = 0;
    wr_valid = 0; wr_data = 0; rx_vld = 0; rx_ctl = 0; rx_data = 0; keep_paths = 0;
    repeat (2) @(posedge clk); rst_n = 1;

    do_write(25'h0000400, 2'd2, 1'b1, cyc);
    repeat (GAP + 2) @(negedge clk);   // let the burst spacing expire
    do_write(25'h1FFFC00, 2'd3, 1'b0, cyc);
    chk(cyc == SC + 1 + BL + 1, $sformatf("gap-free write takes %0d cycles", cyc));

    // read burst
    @(negedge clk);
    req_valid = 1; req_write = 0; req_port = 3; req_addr = 25'h0012C00;
    @(negedge clk);
    req_valid = 0;
    n_rd = 0; cmd_seen = 0; n_fwd_after_cmd = 0;
    for (int c = 0; c < 400 && !done; c++) begin
      if (setup_wait) chk(fwd_on && ret_on, "both lightpaths set up");
      if (cmd_seen && fwd_on) n_fwd_after_cmd++;
      if (cmd_seen) chk(ret_on, "return path held");
      // feed read words after the command, with gaps and one stray control word
      rx_vld = cmd_seen && (c % 3 != 1);
      if (tx_vld && tx_ctl) begin
        chk(tx_data == {OP_READ, 5'b0, 25'h0012C00}, "read command word");
        cmd_seen = 1;
      end
      rx_ctl = (c == 20);
      rx_data = 32'hD000_0000 + n_rd;
      #1;
      if (rx_vld && !rx_ctl) begin
        chk(rd_valid && rd_data == rx_data, "read word to processor");
        n_rd++;
      end else chk(!rd_valid, "no read word");
      @(negedge clk);
      rx_vld = 0; rx_ctl = 0;
    end
    chk(done && n_rd == BL, $sformatf("read done after %0d words", n_rd));
    chk(n_fwd_after_cmd == 0, "forward path dropped right after the read command");
    @(negedge clk);
    chk(!ret_on && req_ready, "return path torn down");
    // pre-allocated lightpaths: the first write sets up both paths and keeps
    // them, the second write to the same node skips setup, a write to another
    // node drops the held paths and sets up again, and releasing the mode
    // while idle drops them.
    keep_paths = 1;
    do_write(25'h0000800, 2'd2, 1'b0, cyc, SC, 1);
    chk(cyc == SC + 1 + BL + 1, "first kept write");
    repeat (3) @(negedge clk);
    chk(fwd_on && ret_on && dst == 2, "paths held while idle");
    do_write(25'h0000C00, 2'd2, 1'b0, cyc, 0, 1);
    chk(cyc == 1 + BL + 1, $sformatf("reused write takes %0d cycles", cyc));
    do_write(25'h0001000, 2'd3, 1'b0, cyc, SC, 1);
    chk(dst == 3, "moved to the other node");
    keep_paths = 0;
    @(negedge clk); @(negedge clk);
    chk(!fwd_on && !ret_on, "paths released");
    chk(n_gaps >= 2 && min_gap >= GAP, $sformatf("%0d write-to-command gaps, shortest %0d", n_gaps, min_gap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
