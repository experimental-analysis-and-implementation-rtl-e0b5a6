// grp_stage: one stage of the GRP multiplexer network.
//
// The 8 positions form 4 pairs (h, h+DIST): for DIST = 4 the pairs are
// (0,4)..(3,7), for DIST = 2 (0,2),(1,3),(4,6),(5,7), for DIST = 1 the
// neighbours. Each kept pair has an H mux at h and an L mux at h+DIST, both
// selected by the control word bit at position h: 1 passes, 0 exchanges.
// The control word bits at L positions are not used by the network; they
// are part of the control word format only. A pair whose KEEP bit is 0 has
// no multiplexers and passes straight. The pairing and H/L placement follow
// the published structure; one shared select per pair is this design's
// reading of it (see grp_tx). Combinational.
module grp_stage
  import grp_pkg::*;
#(
  parameter int unsigned      DIST = 4,
  parameter bit               POL  = 1'b0,
  parameter logic [NPAIR-1:0] KEEP = '1
) (
  input  subword_t cw,
  input  subword_t din,
  output subword_t dout
);

  for (genvar j = 0; j < NPAIR; j++) begin : g_pair
    localparam int unsigned H = pair_h_pos(DIST, j);
    localparam int unsigned L = H + DIST;
    if (KEEP[NPAIR-1-j]) begin : g_mux
      grp_mux2 #(.POL(POL)) u_h (
        .sel(cw[SUBWORD-1-H]), .own(din[SUBWORD-1-H]), .other(din[SUBWORD-1-L]),
        .y(dout[SUBWORD-1-H]));
      grp_mux2 #(.POL(POL)) u_l (
        .sel(cw[SUBWORD-1-H]), .own(din[SUBWORD-1-L]), .other(din[SUBWORD-1-H]),
        .y(dout[SUBWORD-1-L]));
    end else begin : g_wire
      assign dout[SUBWORD-1-H] = din[SUBWORD-1-H];
      assign dout[SUBWORD-1-L] = din[SUBWORD-1-L];
    end
  end

endmodule
