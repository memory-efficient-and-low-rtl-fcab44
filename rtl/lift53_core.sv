// lift53_core: one 5/3 lifting step on a pair of samples (combinational).
//
// A line x[0..L-1] (a row or a column) arrives as pairs (a, b) = (x[2k], x[2k+1]).
// The reversible 5/3 lifting of JPEG 2000 is
//   predict: d[k] = x[2k+1] - floor((x[2k] + x[2k+2]) / 2)     (high band)
//   update : s[k] = x[2k]   + floor((d[k-1] + d[k] + 2) / 4)   (low band)
// d[k] needs the first sample of the next pair, so the pair arriving as step k
// completes the coefficients of pair k-1: the unit is one pair behind its
// input, which keeps it causal without a look-ahead buffer.
//
// The line state is folded into two words so that a line needs only two
// storage words and four adders:
//   P = 2*x[2k-1] + 1 - x[2k-2]        then d[k-1] = floor((P - x[2k]) / 2)
//   Q = 4*x[2k-2] + 2 + d[k-2]         then s[k-1] = floor((Q + d[k-1]) / 4)
// The factors 2 and 4 and the constants 1 and 2 are wiring (concatenation),
// the divisions are Hardwired Scaling Units, so there is no shifter and no
// multiplier. The longest path is two adders (A1 then A2).
//
// Boundaries use zero extension: samples outside the line are 0. A line
// starts from P = 1, Q = 2 (dwt_pkg::P_INIT/Q_INIT). When 'first' is set, (a, b)
// start a new line; the step then emits the last pair of the previous line
// (computed with x[L] = 0: d = floor(P/2)) and loads the new line's state,
// including d[-1] = floor((1 - x[0]) / 2) = -floor(x[0]/2).
//
// Zero extension, the 1/2 and 1/4 factors and the adder-only datapath follow
// the published description; the folded P/Q state and the one-pair output delay are this
// design's choices.
//
// Widths: samples are W bits, coefficients W+1 bits (exact for one level),
// state words W+3 bits.
module lift53_core #(
  parameter int unsigned W = 8
) (
  input  logic                first,  // (a, b) is the first pair of a new line
  input  logic signed [W-1:0] a,      // x[2k]
  input  logic signed [W-1:0] b,      // x[2k+1]
  input  logic signed [W+2:0] p_st,   // state P of the line before this pair
  input  logic signed [W+2:0] q_st,   // state Q of the line before this pair
  output logic signed [W:0]   s_o,    // low coefficient s[k-1] (or last s of old line)
  output logic signed [W:0]   d_o,    // high coefficient d[k-1] (or last d of old line)
  output logic signed [W+2:0] p_nx,   // state P after this pair
  output logic signed [W+2:0] q_nx    // state Q after this pair
);

  localparam int unsigned IW = W + 4;   // internal width, no overflow possible

  typedef logic signed [IW-1:0] iword_t;

  iword_t a_x, b2p1, a4p2, p_sel;
  iword_t a1, a2, a3, a4;
  iword_t d_cur, d_flush, d_out, s_out;
  iword_t unused_q1, unused_q2, unused_h3;

  assign a_x   = iword_t'(a);
  assign b2p1  = iword_t'($signed({b, 1'b1}));         // 2b + 1 (wiring)
  assign a4p2  = iword_t'($signed({a, 2'b10}));        // 4a + 2 (wiring)
  assign p_sel = first ? iword_t'(dwt_pkg::P_INIT) : iword_t'(p_st);

  // Adder 1: predict residue
  assign a1 = p_sel - a_x;
  hsu #(.W(IW)) u_hsu_pred  (.x(a1),               .half(d_cur),   .quarter(unused_q1));
  hsu #(.W(IW)) u_hsu_flush (.x(iword_t'(p_st)),   .half(d_flush), .quarter(unused_q2));

  assign d_out = first ? d_flush : d_cur;

  // Adder 2: update
  assign a2 = iword_t'(q_st) + d_out;
  hsu #(.W(IW)) u_hsu_upd (.x(a2), .half(unused_h3), .quarter(s_out));

  // Adders 3 and 4: next state
  assign a3 = b2p1 - a_x;
  assign a4 = a4p2 + d_cur;

  assign s_o  = s_out[W:0];
  assign d_o  = d_out[W:0];
  assign p_nx = a3[W+2:0];
  assign q_nx = a4[W+2:0];

endmodule
