// serdes: parallel side of the 4 x 2.5 Gb/s link.
//
// Transmit: a 32-bit word with its valid and control flags is striped over the
// four payload lanes, byte l of the word on lane l, each lane symbol carrying
// its own copy of the flags. Receive: the four lane symbols of one cycle are
// gathered back into a word. Both directions are registered, one cycle each.
// The serial 2.5 Gb/s conversion itself happens in the FPGA transceivers, which
// are outside this RTL: one 10-bit symbol per lane per 250 MHz cycle fills a
// 2.5 Gb/s lane exactly.
//
// Four lanes and the 32-bit word follow the document. The symbol layout and the
// lane error flag (set when the lanes of one cycle disagree on their flags,
// which would show lost lane alignment) are this design's own choices; lanes
// are assumed to arrive aligned.
module serdes
  import ocm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // transmit, parallel side
  input  logic              tx_vld,
  input  logic              tx_ctl,
  input  logic [WORD_W-1:0] tx_data,
  output lane_bus_t         tx_lanes,
  // receive, lane side
  input  lane_bus_t         rx_lanes,
  output logic              rx_vld,
  output logic              rx_ctl,
  output logic [WORD_W-1:0] rx_data,
  output logic              rx_lane_err
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_lanes <= '0;
    end else begin
      for (int l = 0; l < LANES; l++) begin
        tx_lanes[l].vld  <= tx_vld;
        tx_lanes[l].ctl  <= tx_vld & tx_ctl;
        tx_lanes[l].data <= tx_vld ? tx_data[l*LANE_BITS +: LANE_BITS] : '0;
      end
    end
  end

  logic [LANES-1:0] vld_v, ctl_v;
  logic [WORD_W-1:0] data_c;
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      vld_v[l] = rx_lanes[l].vld;
      ctl_v[l] = rx_lanes[l].ctl;
      data_c[l*LANE_BITS +: LANE_BITS] = rx_lanes[l].data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_vld      <= 1'b0;
      rx_ctl      <= 1'b0;
      rx_data     <= '0;
      rx_lane_err <= 1'b0;
    end else begin
      rx_vld      <= &vld_v;
      rx_ctl      <= (&vld_v) & (&ctl_v);
      rx_data     <= data_c;
      rx_lane_err <= !((&vld_v) || !(|vld_v)) || !((&ctl_v) || !(|ctl_v));
    end
  end

endmodule
