// banyan_net: the 4x4 circuit-switched optical network.
//
// Six 2x2 switching nodes in three stages of two. Node k of a stage serves
// lines 2k and 2k+1. Between stages the two middle lines cross: output line l
// of one stage feeds input line swap(l) of the next, where swap exchanges 1
// and 2. Stage s routes by header address bit s. With this wiring a message
// entering on any port reaches output port d when A1 = d[1] and A2 = d[0];
// A0 only picks one of two equivalent paths through the first stage.
//
// Each stage adds one cycle to path setup (its gate decision is registered) and
// nothing to the data path, so a message needs three cycles from frame to an
// open end-to-end lightpath.
//
// Six nodes, three stages and three address wavelengths follow the document;
// the line crossing is read from its drawing of the test-bed.
module banyan_net
  import ocm_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  net_sig_t [N-1:0]      port_in,
  output net_sig_t [N-1:0]      port_out,
  output logic [2:0][N-1:0]     blocked,   // [stage][input line]: frame but no path
  output logic [2:0][N-1:0]     path_on    // [stage][input line]: an SOA of this input is on
);

  localparam int unsigned STAGES = 3;

  function automatic int unsigned swap12(int unsigned l);
    return (l == 1) ? 2 : (l == 2) ? 1 : l;
  endfunction

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    net_sig_t [N-1:0] st_in, st_out;
    if (s == 0) begin : g_first
      assign st_in = port_in;
    end else begin : g_next
      for (genvar l = 0; l < N; l++) begin : g_wire
        assign st_in[swap12(l)] = g_stage[s-1].st_out[l];
      end
    end
    for (genvar k = 0; k < N/2; k++) begin : g_node
      logic [1:0][1:0] gate;
      switch_node #(.STAGE(s)) u_node (
        .clk     (clk),
        .rst_n   (rst_n),
        .in_sig  (st_in[2*k+1 -: 2]),
        .out_sig (st_out[2*k+1 -: 2]),
        .gate    (gate),
        .blocked (blocked[s][2*k+1 -: 2])
      );
      assign path_on[s][2*k]   = |gate[0];
      assign path_on[s][2*k+1] = |gate[1];
    end
  end

  assign port_out = g_stage[STAGES-1].st_out;

endmodule
