// tb_ocm_node: a memory node driven through its four lanes. Words are striped
// here, byte l on lane l; a write burst then a read burst of the same row must
// return the written data on all four lanes, in order, with the node's
// latency from command to first read word of T_RCD + CL + 4 cycles (SerDes in
// and out add one cycle each).
module tb_ocm_node;
  import ocm_pkg::*;
  localparam int unsigned BL = 32, CLAT = 4, TRCD = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // asynchronous reset edge before the first clock
  lane_bus_t rx_lanes, tx_lanes;
  sd_req_t sd;
  logic [31:0] sd_rdata;
  logic busy, overflow, lane_err;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0;

  ocm_node #(.BURST_LEN(BL), .FIFO_DEPTH(32), .T_RCD(TRCD), .CL(CLAT), .T_WR(4), .T_RP(4)) dut (.*);
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

  function automatic lane_bus_t stripe(bit ctl, logic [31:0] w);
    lane_bus_t b;
    for (int l = 0; l < 4; l++) begin b[l].vld = 1; b[l].ctl = ctl; b[l].data = w[8*l +: 8]; end
    return b;
  endfunction

  logic [31:0] got [$];
  longint unsigned first_rx = 0;
  always @(negedge clk) if (tx_lanes[0].vld) begin
    logic [31:0] w;
    for (int l = 0; l < 4; l++) w[8*l +: 8] = tx_lanes[l].data;
    chk(tx_lanes[1].vld && tx_lanes[2].vld && tx_lanes[3].vld && !tx_lanes[0].ctl, "lane flags");
    if (got.size() == 0) first_rx = cyc;
    got.push_back(w);
  end

  initial begin
    logic [31:0] wr [BL];
    logic [24:0] a;
    longint unsigned t0;
    rx_lanes = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    a = {1'b0, 2'd3, 12'hFFF, 10'd0};
    rx_lanes = stripe(1, {OP_WRITE, 5'b0, a}); @(negedge clk);
    for (int i = 0; i < BL; i++) begin wr[i] = $urandom; rx_lanes = stripe(0, wr[i]); @(negedge clk); end
    rx_lanes = '0;
    repeat (30) @(negedge clk);
    chk(!busy, "write finished");
    rx_lanes = stripe(1, {OP_READ, 5'b0, a});
    @(negedge clk); t0 = cyc; rx_lanes = '0;
    repeat (BL + 30) @(negedge clk);
    chk(got.size() == BL, $sformatf("%0d read words", got.size()));
    for (int i = 0; i < BL && i < got.size(); i++) chk(got[i] == wr[i], $sformatf("word %0d", i));
    chk(first_rx - t0 == TRCD + CLAT + 4, $sformatf("latency %0d", first_rx - t0));
    chk(mem.violations == 0 && !overflow && !lane_err, "no violations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
