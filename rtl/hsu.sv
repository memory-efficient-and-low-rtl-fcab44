// hsu: Hardwired Scaling Unit.
//
// The 5/3 lifting steps scale by 1/2 (predict) and 1/4 (update). Instead of a
// shifter or multiplier the scaling is done purely by wiring: the output bits
// are the input bits moved down by one or two places, with the sign bit
// replicated into the vacated top positions. This gives floor(x/2) and
// floor(x/4) for two's-complement x at no gate cost and no switching
// activity. The published description proposes the unit by name and function; the
// sign-extension wiring is this design's reading of it.
//
// Interface: purely combinational, x is a signed W-bit number.
module hsu #(
  parameter int unsigned W = 12
) (
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] half,     // floor(x / 2)
  output logic signed [W-1:0] quarter   // floor(x / 4)
);

  assign half    = {x[W-1], x[W-1:1]};
  assign quarter = {{2{x[W-1]}}, x[W-1:2]};

endmodule
