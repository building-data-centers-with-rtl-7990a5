// mem_ctrl: memory controller for circuit-switched optically connected memory.
//
// One memory transaction is one burst of BURST_LEN 32-bit words (a full SDRAM
// row) to or from one memory node. The controller runs the flow:
//
//   IDLE -> request from the processor -> write?
//   write: set up the lightpath MC -> memory node, send the write command word,
//          signal the processor to stream its write data, count BURST_LEN words
//   read:  set up both lightpaths (MC -> node and node -> MC), send the read
//          command word, tear the forward path down at once, signal the
//          processor to receive read data, count BURST_LEN received words
//   burst done -> circuit teardown -> IDLE
//
// The four payload lanes are time-multiplexed: the command word (operation and
// burst address) goes out once with the control flag set on all lanes, then
// the same lanes carry write data. While a lightpath is being set up the
// controller waits SETUP_CYCLES and the processor is stalled (`setup_wait`).
//
// Interface: a valid/ready request; a valid/ready write-data stream accepted
// only while `wr_ready` is high; read words delivered with `rd_valid`;
// `wr_go`/`rd_go` pulse once when streaming may begin and `done` pulses at
// teardown. `rd_data` is the received word itself, passed on without a register. `fwd_on`/`ret_on`/`dst` drive the network control block; `tx_*`
// and `rx_*` connect to the SerDes.
//
// Pre-allocation (`keep_paths`): when set at a request, the controller sets
// up both lightpaths and keeps them after the burst. A following request to
// the same memory node then skips the setup wait (`path_reuse`) and goes
// straight to the command word. A request to another node, or `keep_paths`
// going low while idle, first drops the held paths for one cycle (S_DROP).
// In this mode the forward path is not torn down during a read.
//
// Burst spacing: the memory node has no way to hold off the controller, and
// it needs BURST_LEN + T_RCD + T_WR + T_RP + 2 cycles per write burst (row
// open, 1024 writes, write recovery, precharge). After a write burst the
// controller therefore lets at least BURST_GAP cycles pass before the next
// command word; the default 14 matches the memory node's default timing, so
// write data never pile up in its receive FIFO over a long fill. During a
// normal setup the gap runs concurrently with the setup wait.
//
// The flow, burst length and command/data multiplexing follow the document,
// as does the idea of allocating memory nodes ahead of time to remove the
// lightpath setup latency; the way that mode is controlled is this design's.
// The fixed setup wait (no acknowledgement exists in the network), the burst
// spacing and the command word layout are this design's own choices.
module mem_ctrl
  import ocm_pkg::*;
#(
  parameter int unsigned BURST_LEN    = 1024,
  parameter int unsigned SETUP_CYCLES = 8,
  parameter int unsigned BURST_GAP    = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              keep_paths,   // pre-allocate: hold lightpaths between bursts
  // processor requests
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_write,
  input  logic [PORT_W-1:0] req_port,
  input  logic [ADDR_W-1:0] req_addr,
  // write data from the processor
  output logic              wr_go,
  input  logic              wr_valid,
  output logic              wr_ready,
  input  logic [WORD_W-1:0] wr_data,
  // read data to the processor
  output logic              rd_go,
  output logic              rd_valid,
  output logic [WORD_W-1:0] rd_data,
  output logic              done,
  output logic              setup_wait,
  output logic              path_reuse,   // request served on lightpaths already up
  // network control
  output logic              fwd_on,
  output logic              ret_on,
  output logic [PORT_W-1:0] dst,
  // SerDes
  output logic              tx_vld,
  output logic              tx_ctl,
  output logic [WORD_W-1:0] tx_data,
  input  logic              rx_vld,
  input  logic              rx_ctl,
  input  logic [WORD_W-1:0] rx_data
);

  typedef enum logic [2:0] {
    S_IDLE, S_SETUP, S_CMD, S_WDATA, S_RDATA, S_TEAR, S_DROP
  } state_e;

  localparam int unsigned CW = $clog2(BURST_LEN + 1);
  localparam int unsigned SW = $clog2(SETUP_CYCLES + 1);
  localparam int unsigned GW = $clog2(BURST_GAP + 2);

  state_e            state;
  logic              is_write;
  logic [ADDR_W-1:0] addr_q;
  logic [CW-1:0]     cnt;
  logic [SW-1:0]     setup_cnt;
  logic              go_q;
  logic              keep_q;     // this transaction sets up paths to keep
  logic              paths_up;   // both lightpaths to dst are held
  logic              alloc;
  logic [GW-1:0]     gap_cnt;    // cycles left before the next command word may go
  logic              drop_needed, gap_ok;

  cmd_word_t cmd;
  always_comb begin
    cmd.op   = is_write ? OP_WRITE : OP_READ;
    cmd.rsvd = '0;
    cmd.addr = addr_q;
  end

  assign drop_needed = paths_up && !(keep_paths && (!req_valid || req_port == dst));
  assign gap_ok      = (gap_cnt == 0);
  assign req_ready   = (state == S_IDLE) && !drop_needed && (!paths_up || gap_ok);
  assign setup_wait = (state == S_SETUP);
  assign alloc      = paths_up || (keep_q && state != S_IDLE && state != S_DROP);
  assign fwd_on     = alloc || (state == S_SETUP) || (state == S_CMD) || (state == S_WDATA);
  assign ret_on     = alloc || (!is_write && ((state == S_SETUP) || (state == S_CMD) || (state == S_RDATA)));
  assign path_reuse = (state == S_IDLE) && req_valid && paths_up && keep_paths && (req_port == dst);
  assign wr_ready   = (state == S_WDATA);
  assign wr_go      = go_q && is_write;
  assign rd_go      = go_q && !is_write;
  assign rd_valid   = (state == S_RDATA) && rx_vld && !rx_ctl;
  assign rd_data    = rx_data;
  assign done       = (state == S_TEAR);

  always_comb begin
    tx_vld  = 1'b0;
    tx_ctl  = 1'b0;
    tx_data = '0;
    if (state == S_CMD) begin
      tx_vld  = 1'b1;
      tx_ctl  = 1'b1;
      tx_data = cmd;
    end else if (state == S_WDATA && wr_valid) begin
      tx_vld  = 1'b1;
      tx_data = wr_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      is_write  <= 1'b0;
      addr_q    <= '0;
      dst       <= '0;
      cnt       <= '0;
      setup_cnt <= '0;
      go_q      <= 1'b0;
      keep_q    <= 1'b0;
      paths_up  <= 1'b0;
      gap_cnt   <= '0;
    end else begin
      go_q <= 1'b0;
      if (gap_cnt != 0) gap_cnt <= gap_cnt - 1'b1;
      unique case (state)
        S_IDLE: if (drop_needed) begin
          state <= S_DROP;               // release held paths first
        end else if (req_valid && req_ready) begin
          is_write  <= req_write;
          addr_q    <= req_addr;
          dst       <= req_port;
          keep_q    <= keep_paths;
          setup_cnt <= SW'(SETUP_CYCLES);
          state     <= paths_up ? S_CMD : S_SETUP;
        end
        S_SETUP: begin
          if (setup_cnt <= 1 && gap_cnt <= 1) state <= S_CMD;
          if (setup_cnt != 0) setup_cnt <= setup_cnt - 1'b1;
        end
        S_CMD: begin
          cnt   <= '0;
          go_q  <= 1'b1;
          state <= is_write ? S_WDATA : S_RDATA;
        end
        S_WDATA: if (wr_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(BURST_LEN - 1)) state <= S_TEAR;
        end
        S_RDATA: if (rx_vld && !rx_ctl) begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(BURST_LEN - 1)) state <= S_TEAR;
        end
        S_TEAR: begin
          if (is_write) gap_cnt <= GW'(BURST_GAP);
          paths_up <= keep_q;
          keep_q   <= 1'b0;
          state    <= S_IDLE;
        end
        S_DROP: begin
          paths_up <= 1'b0;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
