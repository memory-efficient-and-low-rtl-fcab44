// row_proc_unit: Row Processing Unit (RPU), 1-D 5/3 DWT along image rows.
//
// Each clock it takes two adjacent pixels of one row (Data1 = x[2k],
// Data2 = x[2k+1]) and produces one low/high coefficient pair, so the lifting
// datapath is busy every cycle. With the dual scan the input alternates
// between the two rows of a stripe: even clocks carry the upper row, odd
// clocks the lower row. The unit therefore keeps the folded lifting state
// (P, Q, see lift53_core) of both rows in a two-deep rotating register: the
// state read this clock was written two clocks ago by the same row.
//
// Timing: outputs are registered, one clock after the input. Because 5/3
// lifting needs one sample of look-ahead, the pair produced for input pair k
// of a row is coefficient pair k-1 of that row (L = s[k-1], H = d[k-1]).
// On the first pair of a row (in_first) the unit emits the last pair of the
// row that previously used the same slot, computed with zero extension, and
// starts the new row from the zero-extension state. The tag travels with
// the data; out_valid follows tag.emit so that no pair is reported for the
// very first input of a frame.
//
// Follows the published description: two inputs and two outputs per clock, two rows on
// alternate clocks, zero extension, no multipliers. This design's choices:
// the folded state and the one-pair output delay.
module row_proc_unit
  import dwt_pkg::*;
#(
  parameter int unsigned PIX_W = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_first,   // first pair of a row
  input  logic signed [PIX_W-1:0] in_x0,      // Data1: x[2k]
  input  logic signed [PIX_W-1:0] in_x1,      // Data2: x[2k+1]
  input  scan_tag_t               in_tag,
  output logic                    out_valid,
  output logic signed [PIX_W:0]   out_l,      // low  coefficient
  output logic signed [PIX_W:0]   out_h,      // high coefficient
  output scan_tag_t               out_tag
);

  typedef logic signed [PIX_W+2:0] st_t;

  st_t p_st [2];
  st_t q_st [2];
  st_t p_nx, q_nx;
  logic signed [PIX_W:0] s_c, d_c;

  // State of the row this input belongs to sits in stage 1 of the rotation.
  lift53_core #(.W(PIX_W)) u_core (
    .first (in_first),
    .a     (in_x0),
    .b     (in_x1),
    .p_st  (p_st[1]),
    .q_st  (q_st[1]),
    .s_o   (s_c),
    .d_o   (d_c),
    .p_nx  (p_nx),
    .q_nx  (q_nx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_st      <= '{default: st_t'(P_INIT)};
      q_st      <= '{default: st_t'(Q_INIT)};
      out_valid <= 1'b0;
      out_l     <= '0;
      out_h     <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid && in_tag.emit;
      if (in_valid) begin
        p_st[0] <= p_nx;
        p_st[1] <= p_st[0];
        q_st[0] <= q_nx;
        q_st[1] <= q_st[0];
        out_l   <= s_c;
        out_h   <= d_c;
        out_tag <= in_tag;
      end
    end
  end

endmodule
