// grp_drp_rx: 8-bit GRP receiver in dual-rail precharge (DRP) logic.
//
// Same scheme as grp_drp_tx, around receiver networks: the input buffers
// make a true rail (din) and a complement rail (~din), both forced to 0
// while `pre` is high; a receiver network of AND-OR muxes carries the true
// rail and one of complementary OR-AND muxes the complement rail. In
// evaluation dout_t is the recovered subword and dout_f its complement; in
// precharge both are 0.
//
// Defaults follow the published DRP receiver with reduced multiplexers
// (KEEP_RX_REDUCED): pair (0,1) in the first stage, pairs (4,6),(5,7) in the
// second and all four pairs of the last stage, as drawn. With this mask it
// inverts grp_drp_tx for every key whose bits at the H positions of the
// transmitter's missing pairs (0 and 2 of stage 1) are 1. The precharge
// value 0 is this design's choice. Combinational.
module grp_drp_rx
  import grp_pkg::*;
#(
  parameter keep_t KEEP = KEEP_RX_REDUCED
) (
  input  grp_key_t key,
  input  logic     pre,
  input  subword_t din,
  output subword_t dout_t,
  output subword_t dout_f
);

  subword_t rail_t, rail_f;
  assign rail_t = pre ? '0 : din;
  assign rail_f = pre ? '0 : ~din;

  grp_rx #(.POL(1'b0), .KEEP(KEEP)) u_true (.key(key), .din(rail_t), .dout(dout_t));
  grp_rx #(.POL(1'b1), .KEEP(KEEP)) u_comp (.key(key), .din(rail_f), .dout(dout_f));

endmodule
