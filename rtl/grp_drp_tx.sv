// grp_drp_tx: 8-bit GRP transmitter in dual-rail precharge (DRP) logic.
//
// Every data bit travels on two rails. The input buffers form the true rail
// (din) and, through inverters, the complement rail (~din); while `pre` is
// high both rails are held at 0 (precharge). The true rail passes through a
// transmitter network of AND-OR muxes, the complement rail through an
// identical network of complementary OR-AND muxes driven by the same key.
// In precharge both outputs are all zeros; in evaluation dout_f == ~dout_t
// and every rail pair makes exactly one 0->1 transition per operation,
// whatever the data, which evens out data-dependent power.
//
// Defaults follow the published DRP transmitter with reduced multiplexers:
// only the pairs that the example key exchanges are built (KEEP_TX_REDUCED),
// so other keys act only on those pairs. KEEP_ALL gives the universal DRP
// structure. The precharge value 0 and the `pre` input are this design's
// choices. Combinational; the sequencing of `pre` is in grp_drp_engine.
module grp_drp_tx
  import grp_pkg::*;
#(
  parameter keep_t KEEP = KEEP_TX_REDUCED
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

  grp_tx #(.POL(1'b0), .KEEP(KEEP)) u_true (.key(key), .din(rail_t), .dout(dout_t));
  grp_tx #(.POL(1'b1), .KEEP(KEEP)) u_comp (.key(key), .din(rail_f), .dout(dout_f));

endmodule
