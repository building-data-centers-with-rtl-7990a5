// ocm_pkg: types and constants shared by the optically connected memory system.
//
// The processor node and the memory (OCM) nodes exchange 32-bit memory words
// striped over four 2.5 Gb/s lanes. With the 250 MHz fabric clock each lane
// carries one 10-bit symbol per cycle: a valid flag, a control flag and one
// data byte. Control symbols carry the command word that opens every memory
// transaction; data symbols carry write or read data. Alongside the payload
// travels a low-speed network header of four wavelengths: a frame and three
// address bits, one per switching stage of the network.
//
// Four lanes, 250 MHz, 32-bit words, 1024-word bursts, 128 MB per memory node
// and the frame-plus-three-address header follow the document. The 10-bit lane
// symbol layout, the command word layout and the SDRAM address split are this
// design's own choices.
package ocm_pkg;

  localparam int unsigned LANES     = 4;   // payload wavelengths
  localparam int unsigned LANE_BITS = 8;   // data bits per lane per cycle
  localparam int unsigned WORD_W    = LANES * LANE_BITS;  // 32-bit memory word
  localparam int unsigned ADDR_W    = 25;  // word address inside one node (128 MB)
  localparam int unsigned COL_W     = 10;  // 1024 words per SDRAM row
  localparam int unsigned ROW_W     = 12;
  localparam int unsigned BANK_W    = 2;
  localparam int unsigned HDR_ADDR  = 3;   // address wavelengths A0..A2
  localparam int unsigned PORT_W    = 2;   // 4x4 network

  // One lane symbol per clock cycle (10 bits = 2.5 Gb/s at 250 MHz).
  typedef struct packed {
    logic                 vld;   // symbol carries information
    logic                 ctl;   // symbol belongs to a command word
    logic [LANE_BITS-1:0] data;
  } lane_sym_t;

  typedef lane_sym_t [LANES-1:0] lane_bus_t;

  // Low-speed header wavelengths: frame plus one address bit per stage.
  typedef struct packed {
    logic                frame;
    logic [HDR_ADDR-1:0] addr;   // addr[s]: output (0 upper, 1 lower) at stage s
  } header_t;

  // Everything one network port carries in one direction.
  typedef struct packed {
    header_t   hdr;
    lane_bus_t lanes;
  } net_sig_t;

  typedef enum logic [1:0] {
    OP_NOP   = 2'd0,
    OP_WRITE = 2'd1,
    OP_READ  = 2'd2
  } op_e;

  // Command word sent once, on all four lanes, at the start of a transaction.
  typedef struct packed {
    op_e              op;     // bits 31:30
    logic [4:0]       rsvd;   // bits 29:25
    logic [ADDR_W-1:0] addr;  // bits 24:0, word address of the burst
  } cmd_word_t;

  // Data patterns of the emulated processor.
  typedef enum logic [1:0] {
    PAT_ONES  = 2'd0,
    PAT_ZEROS = 2'd1,
    PAT_PRBS  = 2'd2,
    PAT_ADDR  = 2'd3
  } pattern_e;

  // SDRAM command as issued by the memory node (one word per command).
  typedef enum logic [2:0] {
    SD_NOP = 3'd0,
    SD_ACT = 3'd1,
    SD_RD  = 3'd2,
    SD_WR  = 3'd3,
    SD_PRE = 3'd4
  } sd_cmd_e;

  typedef struct packed {
    sd_cmd_e           cmd;
    logic              cs;     // which pair of 16-bit chips
    logic [BANK_W-1:0] ba;
    logic [ROW_W-1:0]  addr;   // row for ACT, column (low COL_W bits) for RD/WR
    logic [WORD_W-1:0] wdata;
  } sd_req_t;

  localparam net_sig_t NET_IDLE = '0;

  // One step of 32 bits of the PRBS31 sequence (x^31 + x^28 + 1).
  // Returns {next state, 32 new bits}; the oldest new bit is bit 31.
  function automatic logic [62:0] prbs31_step(input logic [30:0] s);
    logic [30:0] st;
    logic [31:0] bits;
    logic        nb;
    st = s;
    for (int i = 31; i >= 0; i--) begin
      nb      = st[30] ^ st[27];
      bits[i] = nb;
      st      = {st[29:0], nb};
    end
    return {st, bits};
  endfunction

endpackage
