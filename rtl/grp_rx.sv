// grp_rx: universal 8-bit GRP receiver (decryption permutation).
//
// The transmitter run backwards: stages with pair distances 1, 2 and 4,
// steered by key[2], key[1] and key[0] in that order. Every stage of the
// transmitter is its own inverse (it only exchanges pairs), so applying them
// in reverse order with the same control words restores the original
// arrangement: A2 A7 A5 A1 A0 A4 A3 A6 goes back to A7 A6 A5 A4 A3 A2 A0 A1
// with the example key.
//
// The stage order and H/L placement follow the published receiver; the
// shared select per pair is this design's reading, as in grp_tx. KEEP
// removes pairs, POL picks the mux cell structure. Note that a receiver
// with reduced KEEP only inverts a transmitter whose surviving pairs match;
// pairs missing on one side must be "pass" in the key. Combinational.
module grp_rx
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
    grp_stage #(.DIST(stage_dist(1'b1, s)), .POL(POL), .KEEP(KEEP[s])) u_stage (
      .cw(key[STAGES-1-s]), .din(lvl[s]), .dout(lvl[s+1]));
  end

  assign dout = lvl[STAGES];

endmodule
