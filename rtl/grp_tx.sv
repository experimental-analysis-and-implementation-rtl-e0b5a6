// grp_tx: universal 8-bit GRP transmitter (encryption permutation).
//
// Three multiplexer stages with pair distances 4, 2 and 1; stage s is
// steered by control word key[s]. In every pair the H and L mux share the
// control bit of the H position: 1 keeps both bits in place, 0 exchanges
// them. With the example key 10101100 / 11010010 / 00101010 the arrangement
// A7 A6 A5 A4 A3 A2 A0 A1 becomes A2 A7 A5 A1 A0 A4 A3 A6.
//
// The stage distances, the H/L placement and the example follow the
// published structure. Sharing one select per pair is this design's reading:
// it is the rule under which the published control words produce the
// published intermediate arrangements. KEEP removes pairs (reduced-mux
// variants); POL selects the AND-OR (0) or complementary OR-AND (1) mux
// cells so the same network serves either rail of the dual-rail version.
// Purely combinational: din to dout is three mux levels.
module grp_tx
  import grp_pkg::*;
#(
  parameter bit    POL  = 1'b0,
  parameter keep_t KEEP = KEEP_ALL
) (
  input  grp_key_t key,
  input  subword_t din,
  output subword_t dout
);

  subword_t lvl [STAGES+1];
  assign lvl[0] = din;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    grp_stage #(.DIST(stage_dist(1'b0, s)), .POL(POL), .KEEP(KEEP[s])) u_stage (
      .cw(key[s]), .din(lvl[s]), .dout(lvl[s+1]));
  end

  assign dout = lvl[STAGES];

endmodule
