// sdram_model: behavioural model of the SDRAM of one memory node, for
// simulation only (not synthesizable: associative array storage).
//
// Models two chip-select pairs of 16-bit chips side by side as one 32-bit
// word per column, four banks each. Commands are sampled on the rising edge:
// ACT opens a row, WR stores a word, RD returns the word on `rdata` CL cycles
// after the RD was on the bus, PRE closes the bank. It counts protocol
// violations in `violations`: RD/WR to a closed bank, ACT to an open bank, or
// RD/WR fewer than T_RCD cycles after ACT. It also records the longest run of
// back-to-back WR commands. Unwritten words read as a hash of their address.
module sdram_model
  import ocm_pkg::*;
#(
  parameter int unsigned CL    = 4,
  parameter int unsigned T_RCD = 4
) (
  input  logic              clk,
  input  sd_req_t           sd,
  output logic [WORD_W-1:0] rdata
);

  logic [WORD_W-1:0] mem [int unsigned];
  logic [ROW_W-1:0]  open_row [8];
  logic              is_open  [8];
  longint unsigned   act_time [8];
  longint unsigned   cyc = 0;
  int                violations = 0;
  int                n_act = 0, n_rd = 0, n_wr = 0, n_pre = 0;
  int                wr_run = 0, max_wr_run = 0;
  logic [WORD_W-1:0] pipe [CL];

  initial begin
    for (int i = 0; i < 8; i++) begin is_open[i] = 1'b0; open_row[i] = '0; act_time[i] = 0; end
    for (int i = 0; i < int'(CL); i++) pipe[i] = '0;
  end

  function automatic int unsigned key(logic cs, logic [BANK_W-1:0] ba, logic [ROW_W-1:0] row,
                                      logic [COL_W-1:0] col);
    return {cs, ba, row, col};
  endfunction

  function automatic logic [WORD_W-1:0] peek(int unsigned k);
    return mem.exists(k) ? mem[k] : (k * 32'h9E37_79B9) ^ 32'h5A5A_0F0F;
  endfunction

  // Flip one bit of a stored word (used to test error detection).
  task automatic flip(int unsigned k, int unsigned b);
    mem[k] = peek(k) ^ (32'h1 << b);
  endtask

  assign rdata = pipe[CL-1];

  always @(posedge clk) begin
    automatic int unsigned bk = {sd.cs, sd.ba};
    automatic logic [WORD_W-1:0] rd_word = '0;
    cyc++;
    case (sd.cmd)
      SD_ACT: begin
        n_act++;
        if (is_open[bk]) violations++;
        is_open[bk]  = 1'b1;
        open_row[bk] = sd.addr;
        act_time[bk] = cyc;
      end
      SD_WR, SD_RD: begin
        if (!is_open[bk] || (cyc - act_time[bk]) < T_RCD) violations++;
        if (sd.cmd == SD_WR) begin
          n_wr++;
          mem[key(sd.cs, sd.ba, open_row[bk], sd.addr[COL_W-1:0])] = sd.wdata;
        end else begin
          n_rd++;
          rd_word = peek(key(sd.cs, sd.ba, open_row[bk], sd.addr[COL_W-1:0]));
        end
      end
      SD_PRE: begin
        n_pre++;
        is_open[bk] = 1'b0;
      end
      default: ;
    endcase
    if (sd.cmd == SD_WR) begin
      wr_run++;
      if (wr_run > max_wr_run) max_wr_run = wr_run;
    end else wr_run = 0;
    // CL-stage read pipe: data on rdata CL cycles after the RD was on the bus
    for (int i = int'(CL) - 1; i > 0; i--) pipe[i] <= pipe[i-1];
    pipe[0] <= rd_word;
  end

endmodule
