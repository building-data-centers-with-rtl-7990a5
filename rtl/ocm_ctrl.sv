// ocm_ctrl: transaction logic of an optically connected memory (OCM) node.
//
// The node has no network logic: lightpaths are set up by the processor's
// memory controller, and this block only reacts to what arrives on the lanes.
// Every received word (command or write data) enters a FIFO of FIFO_DEPTH
// entries, which absorbs incoming data while the SDRAM row is being opened and
// lets a new command queue behind the end of the previous burst. A sequencer
// pops the FIFO:
//
//   command word -> ACT (row of the burst) -> wait T_RCD
//   write: one WR per incoming data word, columns 0 .. BURST_LEN-1,
//          then wait T_WR, PRE, wait T_RP
//   read:  one RD per cycle over columns 0 .. BURST_LEN-1; every read word
//          leaves for the lanes CL cycles after its RD, as soon as the SDRAM
//          delivers it; then PRE once the last word is out, wait T_RP
//
// SDRAM interface: one registered command per cycle (`sd`), a 32-bit word per
// RD/WR as two 16-bit chips side by side. Read data must be on `sd_rdata` CL
// cycles after the cycle in which the RD is on `sd` (CL >= 1); they are passed
// to the SerDes in that cycle, without a register. Address split of the 25-bit word address: {cs, bank, row, col}
// with a 10-bit column, so one burst is one full row of 1024 words.
//
// Following the document: one command set per burst, full-row 1024-word
// bursts, 32-bit words from two 16-bit chips, 128 MB per node, read data
// streamed back the moment they are available. This design's own choices: the
// FIFO, the timing parameters, the address split, and no refresh (none is
// described; a refresh timer would be needed for data held longer than the
// SDRAM retention time). `overflow` is a sticky flag for a full FIFO. The
// reserved bits 29:25 of the command word are ignored.
module ocm_ctrl
  import ocm_pkg::*;
#(
  parameter int unsigned BURST_LEN  = 1024,
  parameter int unsigned FIFO_DEPTH = 32,
  parameter int unsigned T_RCD      = 4,
  parameter int unsigned CL         = 4,
  parameter int unsigned T_WR       = 4,
  parameter int unsigned T_RP       = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the SerDes
  input  logic              rx_vld,
  input  logic              rx_ctl,
  input  logic [WORD_W-1:0] rx_data,
  // to the SerDes
  output logic              tx_vld,
  output logic              tx_ctl,
  output logic [WORD_W-1:0] tx_data,
  // SDRAM
  output sd_req_t           sd,
  input  logic [WORD_W-1:0] sd_rdata,
  // status
  output logic              busy,
  output logic              overflow
);

  // ---------------- receive FIFO ----------------
  localparam int unsigned AW = $clog2(FIFO_DEPTH);
  logic [WORD_W:0]   fifo_mem [FIFO_DEPTH];
  logic [AW:0]       wr_ptr, rd_ptr;
  logic              fifo_empty, fifo_full, pop;
  logic [WORD_W:0]   fifo_head;

  assign fifo_empty = (wr_ptr == rd_ptr);
  assign fifo_full  = (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]) && (wr_ptr[AW] != rd_ptr[AW]);
  assign fifo_head  = fifo_mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (rx_vld && !fifo_full) fifo_mem[wr_ptr[AW-1:0]] <= {rx_ctl, rx_data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      overflow <= 1'b0;
    end else begin
      if (rx_vld && !fifo_full) wr_ptr <= wr_ptr + 1'b1;
      if (rx_vld && fifo_full)  overflow <= 1'b1;
      if (pop)                  rd_ptr <= rd_ptr + 1'b1;
    end
  end

  // ---------------- sequencer ----------------
  typedef enum logic [2:0] {
    Q_IDLE, Q_ACT, Q_WAIT_RCD, Q_WRITE, Q_READ, Q_DRAIN, Q_PRE, Q_WAIT_RP
  } qstate_e;

  localparam int unsigned CW = $clog2(BURST_LEN + 1);
  localparam int unsigned TMAX = T_RCD + T_WR + T_RP + CL + 2;
  localparam int unsigned TW = $clog2(TMAX + 1);

  qstate_e           state;
  op_e               op_q;
  logic [ADDR_W-1:0] addr_q;
  logic [CW-1:0]     col;
  logic [TW-1:0]     timer;
  logic [CL:0]       rd_pipe;

  logic              head_ctl;
  cmd_word_t         head_cmd;
  assign head_ctl = fifo_head[WORD_W];
  assign head_cmd = cmd_word_t'(fifo_head[WORD_W-1:0]);

  // Pop: commands (and stray data) in idle, data words while writing.
  assign pop = !fifo_empty &&
               ((state == Q_IDLE) || (state == Q_WRITE && !head_ctl));

  wire logic               cs_b   = addr_q[ADDR_W-1];
  wire logic [BANK_W-1:0]  bank_b = addr_q[ADDR_W-2 -: BANK_W];
  wire logic [ROW_W-1:0]   row_b  = addr_q[COL_W +: ROW_W];

  assign busy = (state != Q_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= Q_IDLE;
      op_q    <= OP_NOP;
      addr_q  <= '0;
      col     <= '0;
      timer   <= '0;
      rd_pipe <= '0;
      sd      <= '0;
    end else begin
      sd.cmd   <= SD_NOP;
      rd_pipe  <= {rd_pipe[CL-1:0], 1'b0};
      if (timer != 0) timer <= timer - 1'b1;
      unique case (state)
        Q_IDLE: if (pop && head_ctl &&
                    (head_cmd.op == OP_WRITE || head_cmd.op == OP_READ)) begin
          op_q   <= head_cmd.op;
          addr_q <= head_cmd.addr;
          state <= Q_ACT;
        end
        Q_ACT: begin
          sd.cmd  <= SD_ACT;
          sd.cs   <= cs_b;
          sd.ba   <= bank_b;
          sd.addr <= row_b;
          timer   <= TW'(T_RCD - 1);
          col     <= '0;
          state   <= Q_WAIT_RCD;
        end
        Q_WAIT_RCD: if (timer <= 1) state <= (op_q == OP_WRITE) ? Q_WRITE : Q_READ;
        Q_WRITE: if (pop) begin
          sd.cmd   <= SD_WR;
          sd.addr  <= ROW_W'(col);
          sd.wdata <= fifo_head[WORD_W-1:0];
          col      <= col + 1'b1;
          if (col == CW'(BURST_LEN - 1)) begin
            timer <= TW'(T_WR);
            state <= Q_DRAIN;
          end
        end
        Q_READ: begin
          sd.cmd     <= SD_RD;
          sd.addr    <= ROW_W'(col);
          rd_pipe[0] <= 1'b1;
          col        <= col + 1'b1;
          if (col == CW'(BURST_LEN - 1)) begin
            timer <= TW'(CL + 2);
            state <= Q_DRAIN;
          end
        end
        Q_DRAIN: if (timer <= 1) state <= Q_PRE;
        Q_PRE: begin
          sd.cmd <= SD_PRE;
          timer  <= TW'(T_RP);
          state  <= Q_WAIT_RP;
        end
        Q_WAIT_RP: if (timer <= 1) state <= Q_IDLE;
        default: state <= Q_IDLE;
      endcase
    end
  end

  // Read words leave as soon as the SDRAM delivers them.
  assign tx_vld  = rd_pipe[CL];
  assign tx_ctl  = 1'b0;
  assign tx_data = rd_pipe[CL] ? sd_rdata : '0;

endmodule
