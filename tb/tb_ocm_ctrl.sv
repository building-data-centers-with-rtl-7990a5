// tb_ocm_ctrl: memory node transaction logic against the SDRAM model.
// A write burst is followed back-to-back by a queued read of the same row; the
// read data must equal the written data, and the SDRAM must see one ACT, one
// WR per word in consecutive cycles, and one PRE per burst with no timing
// violation. A read issued to an idle node must return its first word exactly
// T_RCD + CL + 2 cycles after the command is received. Finally the receive
// FIFO is overrun on purpose and the overflow flag must rise.
module tb_ocm_ctrl;
  import ocm_pkg::*;
  localparam int unsigned BL = 16, CLAT = 4, TRCD = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // asynchronous reset edge before the first clock
  logic rx_vld, rx_ctl, tx_vld, tx_ctl, busy, overflow;
  logic [31:0] rx_data, tx_data, sd_rdata;
  sd_req_t sd;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0;

  ocm_ctrl #(.BURST_LEN(BL), .FIFO_DEPTH(32), .T_RCD(TRCD), .CL(CLAT), .T_WR(4), .T_RP(4)) dut (.*);
  sdram_model #(.CL(CLAT), .T_RCD(TRCD)) mem (.clk, .sd, .rdata(sd_rdata));

  always #2 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic [31:0] rx_q [$];
  always @(negedge clk) if (tx_vld) begin
    chk(!tx_ctl, "read words carry no control flag");
    rx_q.push_back(tx_data);
  end

  task automatic send(bit ctl, logic [31:0] w);
    rx_vld = 1; rx_ctl = ctl; rx_data = w;
    @(negedge clk);
    rx_vld = 0; rx_ctl = 0;
  endtask

  initial begin
    logic [31:0] wr [BL];
    logic [24:0] a;
    longint unsigned t0;
    rx_vld = 0; rx_ctl = 0; rx_data = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    a = {1'b1, 2'd2, 12'h123, 10'd0};
    send(1, {OP_WRITE, 5'b0, a});
    for (int i = 0; i < BL; i++) begin wr[i] = $urandom; send(0, wr[i]); end
    send(1, {OP_READ, 5'b0, a});
    repeat (BL + 40) @(negedge clk);
    chk(rx_q.size() == BL, $sformatf("read returned %0d words", rx_q.size()));
    for (int i = 0; i < BL && i < rx_q.size(); i++) chk(rx_q[i] == wr[i], $sformatf("read word %0d", i));
    chk(mem.max_wr_run == BL, $sformatf("write rate: %0d back-to-back WR", mem.max_wr_run));
    chk(mem.n_act == 2 && mem.n_pre == 2 && mem.n_wr == BL && mem.n_rd == BL, $sformatf("command counts act %0d pre %0d wr %0d rd %0d", mem.n_act, mem.n_pre, mem.n_wr, mem.n_rd));
    chk(!busy, "idle after both bursts");
    // latency of a read to an idle node
    rx_q.delete();
    a = {1'b0, 2'd1, 12'h0AB, 10'd0};
    rx_vld = 1; rx_ctl = 1; rx_data = {OP_READ, 5'b0, a};
    @(negedge clk); t0 = cyc; rx_vld = 0; rx_ctl = 0;
    while (!tx_vld && cyc < t0 + 100) @(negedge clk);
    chk(cyc - t0 == TRCD + CLAT + 2, $sformatf("first read word after %0d cycles", cyc - t0));
    repeat (BL + 20) @(negedge clk);
    chk(rx_q.size() == BL, "second read length");
    chk(mem.violations == 0, $sformatf("SDRAM protocol violations %0d", mem.violations));
    chk(!overflow, "no overflow so far");
    // overrun: a read followed by far more words than the FIFO holds
    send(1, {OP_READ, 5'b0, a});
    for (int i = 0; i < 40; i++) send(0, i);
    chk(overflow, "overflow flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
