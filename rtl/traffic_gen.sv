// traffic_gen: emulated processor of the processor node.
//
// A programmable, self-verifying memory traffic source standing in for a
// streaming application. On `start` it writes bursts [burst_first,
// burst_first + burst_count) of every memory node in [node_first, node_first +
// node_count) with one of four data patterns, then reads the same bursts back
// in the same order and compares every received word with the expected one.
// Patterns: all ones, all zeros, the 2^31-1 pseudorandom bit sequence
// (x^31 + x^28 + 1, 32 bits per word, restarted from all ones at the start of
// the write pass and of the read pass), or the word's own address (node index
// in bits 31:30, 25-bit word address in bits 24:0).
//
// Counters: `words_checked` counts verified words and `bit_errors` counts
// differing bits; bit_errors / (32 * words_checked) is the effective memory
// bit-error rate. `word_errors` counts words with at least one wrong bit. The
// 64-bit counters add up over any number of passes until `clear`, so a long
// run (over 10^12 verified bits) can be accumulated in hardware.
//
// Interface: configuration inputs are sampled on `start`; `done` pulses when
// the read pass ends. Requests, write data and read data follow mem_ctrl's
// handshakes; write data are offered every cycle once `wr_go` was seen, and read data
// are taken once `rd_go` was seen. Requests are whole bursts, so the ten
// column bits of `req_addr` are always 0. Memory
// node i sits at network port OCM_PORT_BASE + i.
//
// The four patterns, fill-then-read-back order and the error counter follow
// the document; the PRBS polynomial, seeds and counter widths are this
// design's own choices.
module traffic_gen
  import ocm_pkg::*;
#(
  parameter int unsigned BURST_LEN     = 1024,
  parameter int unsigned OCM_PORT_BASE = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration and status
  input  logic              start,
  input  logic              clear,
  input  pattern_e          pattern,
  input  logic [1:0]        node_first,
  input  logic [2:0]        node_count,
  input  logic [ADDR_W-COL_W-1:0] burst_first,
  input  logic [ADDR_W-COL_W:0]   burst_count,
  output logic              busy,
  output logic              done,
  output logic [63:0]       words_checked,
  output logic [63:0]       bit_errors,
  output logic [63:0]       word_errors,
  // memory controller
  output logic              req_valid,
  input  logic              req_ready,
  output logic              req_write,
  output logic [PORT_W-1:0] req_port,
  output logic [ADDR_W-1:0] req_addr,
  input  logic              wr_go,
  output logic              wr_valid,
  input  logic              wr_ready,
  output logic [WORD_W-1:0] wr_data,
  input  logic              rd_go,
  input  logic              rd_valid,
  input  logic [WORD_W-1:0] rd_data,
  input  logic              mc_done
);

  localparam int unsigned BW = ADDR_W - COL_W;   // burst index width
  localparam int unsigned WW = $clog2(BURST_LEN);

  typedef enum logic [1:0] {T_IDLE, T_REQ, T_XFER} tstate_e;

  tstate_e             state;
  pattern_e            pat_q;
  logic                phase_wr;
  logic [1:0]          node_q, node_first_q;
  logic [2:0]          node_left, node_count_q;
  logic [BW-1:0]       burst_q, burst_first_q;
  logic [BW:0]         burst_left, burst_count_q;
  logic [WW-1:0]       word_idx;
  logic                streaming;
  logic [30:0]         prbs_state;
  logic [62:0]         prbs_next;
  logic [ADDR_W-1:0]   word_addr;
  logic [WORD_W-1:0]   expect_word;
  logic                advance;

  assign word_addr = ADDR_W'({burst_q, {COL_W{1'b0}}}) + ADDR_W'(word_idx);
  assign prbs_next = prbs31_step(prbs_state);

  always_comb begin
    unique case (pat_q)
      PAT_ONES:  expect_word = '1;
      PAT_ZEROS: expect_word = '0;
      PAT_PRBS:  expect_word = prbs_next[31:0];
      default:   expect_word = {node_q, 5'b0, word_addr};
    endcase
  end

  assign busy      = (state != T_IDLE);
  assign req_valid = (state == T_REQ);
  assign req_write = phase_wr;
  assign req_port  = PORT_W'(OCM_PORT_BASE) + PORT_W'(node_q);
  assign req_addr  = {burst_q, {COL_W{1'b0}}};
  assign wr_valid  = (state == T_XFER) && phase_wr && (streaming || wr_go);
  assign wr_data   = expect_word;
  assign advance   = phase_wr ? (wr_valid && wr_ready) : (state == T_XFER && (streaming || rd_go) && rd_valid);

  logic [5:0] diff_bits;
  always_comb begin
    diff_bits = '0;
    for (int b = 0; b < WORD_W; b++) diff_bits += 6'(rd_data[b] ^ expect_word[b]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= T_IDLE;
      pat_q         <= PAT_ONES;
      phase_wr      <= 1'b1;
      node_q        <= '0;
      node_first_q  <= '0;
      node_left     <= '0;
      node_count_q  <= '0;
      burst_q       <= '0;
      burst_first_q <= '0;
      burst_left    <= '0;
      burst_count_q <= '0;
      word_idx      <= '0;
      streaming     <= 1'b0;
      prbs_state    <= '1;
      done          <= 1'b0;
      words_checked <= '0;
      bit_errors    <= '0;
      word_errors   <= '0;
    end else begin
      done <= 1'b0;
      if (advance) begin
        word_idx   <= word_idx + 1'b1;
        prbs_state <= prbs_next[62:32];
      end
      if (clear) begin
        words_checked <= '0;
        bit_errors    <= '0;
        word_errors   <= '0;
      end else if (advance) begin
        if (!phase_wr) begin
          words_checked <= words_checked + 1;
          bit_errors    <= bit_errors + 64'(diff_bits);
          if (diff_bits != 0) word_errors <= word_errors + 1;
        end
      end
      unique case (state)
        T_IDLE: if (start && node_count != 0 && burst_count != 0) begin
          pat_q         <= pattern;
          phase_wr      <= 1'b1;
          node_q        <= node_first;
          node_first_q  <= node_first;
          node_left     <= node_count;
          node_count_q  <= node_count;
          burst_q       <= burst_first;
          burst_first_q <= burst_first;
          burst_left    <= burst_count;
          burst_count_q <= burst_count;
          prbs_state    <= '1;
          state         <= T_REQ;
        end
        T_REQ: if (req_ready) begin
          word_idx  <= '0;
          streaming <= 1'b0;
          state     <= T_XFER;
        end
        T_XFER: begin
          if (wr_go || rd_go) streaming <= 1'b1;
          if (mc_done) begin
            streaming <= 1'b0;
            state     <= T_REQ;
            if (burst_left > 1) begin
              burst_q    <= burst_q + 1'b1;
              burst_left <= burst_left - 1'b1;
            end else if (node_left > 1) begin
              node_q     <= node_q + 1'b1;
              node_left  <= node_left - 1'b1;
              burst_q    <= burst_first_q;
              burst_left <= burst_count_q;
            end else if (phase_wr) begin
              phase_wr   <= 1'b0;
              prbs_state <= '1;
              node_q     <= node_first_q;
              node_left  <= node_count_q;
              burst_q    <= burst_first_q;
              burst_left <= burst_count_q;
            end else begin
              state <= T_IDLE;
              done  <= 1'b1;
            end
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

endmodule
