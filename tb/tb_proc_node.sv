// tb_proc_node: the processor node against a lane-level stand-in for the
// network and two memory nodes. The stand-in accepts payload only while the
// node's forward header is up and addressed to a memory port (route bits
// A1 = dst[1], A2 = dst[0]), stores write bursts, and answers a read command on
// the lanes only while the return header for that port is up and routed to
// port 0. A full write-then-read pass over two nodes must verify every word.
module tb_proc_node;
  import ocm_pkg::*;
  localparam int unsigned BL = 16;
  logic clk = 0, rst_n = 0;
  logic start, clear; pattern_e pattern; logic [1:0] node_first; logic [2:0] node_count;
  logic [14:0] burst_first; logic [15:0] burst_count;
  logic busy, done; logic [63:0] words_checked, bit_errors, word_errors;
  net_sig_t net_tx; lane_bus_t net_rx_lanes; header_t ret_hdr; logic [1:0] ret_port;
  logic setup_wait, path_reuse, mc_done, lane_err;
  logic keep_paths = 1'b0;
  int checks = 0, failures = 0;

  proc_node #(.BURST_LEN(BL), .SETUP_CYCLES(6), .SRC_PORT(0), .OCM_PORT_BASE(2)) dut (.*);

  always #2 clk = ~clk;
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // memory stand-in
  logic [31:0] store [int unsigned];
  int          wr_left = 0, wr_port = 0, rd_delay = -1, rd_port = 0, rd_idx = 0;
  logic [24:0] cur_addr;
  int          n_setup_cycles = 0, n_bursts = 0, n_stray = 0;

  function automatic logic [31:0] gather(lane_bus_t b);
    logic [31:0] w;
    for (int l = 0; l < 4; l++) w[8*l +: 8] = b[l].data;
    return w;
  endfunction

  always @(posedge clk) begin
    net_rx_lanes <= '0;
    if (setup_wait) n_setup_cycles++;
    if (net_tx.lanes[0].vld) begin
      int p;
      p = {net_tx.hdr.addr[1], net_tx.hdr.addr[2]};
      if (!net_tx.hdr.frame || p < 2 || net_tx.hdr.addr[0]) n_stray++;
      else if (net_tx.lanes[0].ctl) begin
        cmd_word_t c;
        c = cmd_word_t'(gather(net_tx.lanes));
        cur_addr = c.addr;
        n_bursts++;
        if (c.op == OP_WRITE) begin wr_left = BL; wr_port = p; end
        else begin rd_delay = 30; rd_port = p; rd_idx = 0; end
      end else if (wr_left > 0) begin
        store[wr_port * 2**25 + cur_addr + BL - wr_left] = gather(net_tx.lanes);
        wr_left--;
      end else n_stray++;
    end
    if (rd_delay > 0) rd_delay--;
    else if (rd_delay == 0) begin
      if (ret_hdr.frame && ret_port == 2'(rd_port) && ret_hdr.addr == 3'b000) begin
        logic [31:0] w;
        w = store[rd_port * 2**25 + cur_addr + rd_idx];
        for (int l = 0; l < 4; l++) begin
          net_rx_lanes[l].vld <= 1'b1; net_rx_lanes[l].ctl <= 1'b0; net_rx_lanes[l].data <= w[8*l +: 8];
        end
        rd_idx++;
        if (rd_idx == BL) rd_delay = -1;
      end else n_stray++;
    end
  end

  task automatic run(pattern_e p);
    int guard = 0;
    @(negedge clk);
    pattern = p; node_first = 0; node_count = 2; burst_first = 3; burst_count = 3;
    start = 1; clear = 1; @(negedge clk); start = 0; clear = 0;
    while (busy && guard < 30000) begin @(negedge clk); guard++; end
    chk(!busy, "pass finished");
    chk(words_checked == 2 * 3 * BL, $sformatf("words checked %0d", words_checked));
    chk(bit_errors == 0 && word_errors == 0, $sformatf("bit errors %0d", bit_errors));
  endtask

  initial begin
    start = 0; clear = 0; pattern = PAT_ONES; node_first = 0; node_count = 0; burst_first = 0; burst_count = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    run(PAT_PRBS);
    run(PAT_ADDR);
    chk(n_bursts == 2 * 2 * 2 * 3, $sformatf("%0d transactions", n_bursts));
    // a setup right after a write burst may be stretched by the burst spacing
    chk(n_setup_cycles >= n_bursts * 6 && n_setup_cycles <= n_bursts * (6 + 14),
        $sformatf("setup stall cycles %0d", n_setup_cycles));
    chk(n_stray == 0, $sformatf("%0d symbols outside a lightpath", n_stray));
    chk(!lane_err, "lanes aligned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
