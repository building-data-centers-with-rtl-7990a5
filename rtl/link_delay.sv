// link_delay: fixed latency of one unidirectional optical path.
//
// Delays a network port signal (header wavelengths and the four payload lane
// symbols) by DELAY clock cycles, with a shift register cleared at reset.
// DELAY = 0 gives a plain wire. The default, 55 cycles at 250 MHz = 220 ns,
// is the document's roughly 100 ns of transceiver and SerDes logic plus
// roughly 120 ns of time of flight through 24 m of fibre and the network.
// Applying the same delay to header and payload is this design's choice: both
// travel together on one fibre as a wavelength-striped message.
module link_delay
  import ocm_pkg::*;
#(
  parameter int unsigned DELAY = 55
) (
  input  logic     clk,
  input  logic     rst_n,
  input  net_sig_t din,
  output net_sig_t dout
);

  if (DELAY == 0) begin : g_wire
    assign dout = din;
  end else begin : g_pipe
    net_sig_t pipe [DELAY];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(DELAY); i++) pipe[i] <= NET_IDLE;
      end else begin
        pipe[0] <= din;
        for (int i = 1; i < int'(DELAY); i++) pipe[i] <= pipe[i-1];
      end
    end
    assign dout = pipe[DELAY-1];
  end

endmodule
