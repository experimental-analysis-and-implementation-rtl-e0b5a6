// grp_mux2: the 2x1 multiplexer from which the GRP network is built.
//
// y follows `own` (the input at the mux's own position) when sel = 1 and
// `other` (the partner position) when sel = 0. An H and an L mux of one pair
// share a select, so the pair either passes or exchanges its two bits.
//
// POL chooses the gate structure. POL = 0 is the ordinary AND-OR mux used on
// the true rail. POL = 1 is its complementary form for the complement rail
// of dual-rail precharge logic: AND and OR are exchanged, giving
// (~sel | own) & (sel | other). Both compute the same selection; the point
// of the pair is that with both data rails precharged to 0 each cell outputs
// 0 whatever the select, and in evaluation exactly one rail of each signal
// rises. The AND/OR exchange follows the published DRP cell; keeping the
// select inverter inside the cell, and precharging to 0, are this design's
// choices. Purely combinational.
module grp_mux2 #(
  parameter bit POL = 1'b0
) (
  input  logic sel,
  input  logic own,
  input  logic other,
  output logic y
);

  logic sel_n;
  assign sel_n = ~sel;

  if (POL == 1'b0) begin : g_and_or
    assign y = (sel & own) | (sel_n & other);
  end else begin : g_or_and
    assign y = (sel_n | own) & (sel | other);
  end

endmodule
