// grp_pkg: types and constants shared by the GRP permutation cipher.
//
// The cipher permutes one 8-bit subword through three stages of 2x1
// multiplexer pairs (a butterfly). Every stage is steered by one 8-bit
// control word; the three control words together are the key.
//
// Ordering convention used everywhere: a subword, a control word and a
// keep mask are written left to right as positions 0..N-1, the way the
// structure is drawn. Position p of an 8-bit word is bit [7-p]. The key and
// the keep masks are packed with ascending stage index, so the literal
// 24'b10101100_11010010_00101010 gives key[0] = 10101100 (stage 1).
//
// KEEP masks say which multiplexer pairs physically exist in a stage: a
// pair that is left out passes both bits straight through. All ones is the
// universal structure; the reduced masks below are the ones drawn for the
// DRP transmitter and receiver built for the example key.
package grp_pkg;

  localparam int unsigned SUBWORD = 8;            // bits per GRP subword
  localparam int unsigned STAGES  = 3;            // log2(SUBWORD) stages
  localparam int unsigned NPAIR   = SUBWORD / 2;  // mux pairs per stage

  typedef logic [SUBWORD-1:0] subword_t;
  // key[s] is the control word of transmitter stage s (s = 0 is stage 1).
  typedef logic [0:STAGES-1][SUBWORD-1:0] grp_key_t;
  // keep[s][NPAIR-1-j] is set when pair j of stage s has its multiplexers.
  typedef logic [0:STAGES-1][NPAIR-1:0] keep_t;

  // Example key: control words of stages 1, 2 and 3.
  localparam grp_key_t EXAMPLE_KEY = 24'b10101100_11010010_00101010;
  localparam keep_t    KEEP_ALL    = '1;
  // Reduced transmitter: pairs (1,5),(3,7) / (4,6),(5,7) / (0,1).
  localparam keep_t    KEEP_TX_REDUCED = 12'b0101_0011_1000;
  // Reduced receiver: pair (0,1) / (4,6),(5,7) / all four pairs.
  localparam keep_t    KEEP_RX_REDUCED = 12'b1000_0011_1111;

  // Distance between the two positions of a pair in a stage.
  function automatic int unsigned stage_dist(bit is_rx, int unsigned s);
    return is_rx ? (1 << s) : (SUBWORD >> (s + 1));
  endfunction

  // Position of the H (upper) multiplexer of pair j in a stage of distance d:
  // the pairs of a stage are numbered left to right by their H position.
  function automatic int unsigned pair_h_pos(int unsigned d, int unsigned j);
    return (j / d) * 2 * d + (j % d);
  endfunction

  // Reference model of one stage: a pair exchanges its two bits when the
  // control bit at its H position is 0 and the pair is kept.
  function automatic subword_t stage_ref(subword_t din, subword_t cw,
                                         int unsigned d, logic [NPAIR-1:0] keep);
    subword_t r = din;
    for (int unsigned j = 0; j < NPAIR; j++) begin
      int unsigned h = pair_h_pos(d, j);
      int unsigned l = h + d;
      if (keep[NPAIR-1-j] && !cw[SUBWORD-1-h]) begin
        r[SUBWORD-1-h] = din[SUBWORD-1-l];
        r[SUBWORD-1-l] = din[SUBWORD-1-h];
      end
    end
    return r;
  endfunction

endpackage
