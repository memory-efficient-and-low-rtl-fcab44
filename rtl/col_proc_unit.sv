// col_proc_unit: Column Processing Unit (CPU), 1-D 5/3 DWT along columns.
//
// Each clock it takes one vertical pair from the transpose unit: Data3 and
// Data4 are the 1-D coefficients of the same column in the upper and lower
// row of the current stripe. Columns arrive in the fixed order
// L0, H0, L1, H1, ... (N columns per stripe), so the lifting state of every
// column can live in shift registers of length N that behave like FIFOs:
// the word leaving the end is the state the same column left one stripe
// earlier, and the new state enters at the front. The state is the folded
// pair (P, Q) of lift53_core, so the unit holds 2N words in two buffers and
// uses the same four adders as the row unit.
//
// The buffers are cleared at reset. On the first stripe of a frame
// (in_tag.s0) every column restarts from the zero-extension state and no
// result is emitted. Each later stripe m emits the 2-D coefficients of stripe
// m-1 for that column; the extra all-zero stripe that the scan controller
// appends after the last image stripe supplies the bottom zero extension.
// For an L column the outputs are (LL, LH), for an H column (HL, HH);
// out_lo is the vertical low band, out_hi the vertical high band.
//
// Timing: registered outputs, one clock after the input pair.
// Follows the published description: buffers of length N shifted like a FIFO, zero
// start for zero extension, two coefficients out per clock. This design's
// choices: the folded two-word state and the one-stripe output delay.
module col_proc_unit
  import dwt_pkg::*;
#(
  parameter int unsigned N = 256,   // columns per stripe (image width)
  parameter int unsigned W = 9      // width of the row coefficients
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_hcol,
  input  logic signed [W-1:0] in_a,       // Data3: upper row
  input  logic signed [W-1:0] in_b,       // Data4: lower row
  input  scan_tag_t           in_tag,
  output logic                out_valid,
  output logic                out_hcol,   // 0: (LL, LH), 1: (HL, HH)
  output logic signed [W:0]   out_lo,     // vertical low  (LL or HL)
  output logic signed [W:0]   out_hi,     // vertical high (LH or HH)
  output logic                out_last    // last coefficient pair of the frame
);

  typedef logic signed [W+2:0] st_t;

  st_t p_buf [N];
  st_t q_buf [N];
  st_t p_nx, q_nx;
  logic signed [W:0] s_c, d_c;

  lift53_core #(.W(W)) u_core (
    .first (in_tag.s0),
    .a     (in_a),
    .b     (in_b),
    .p_st  (p_buf[N-1]),
    .q_st  (q_buf[N-1]),
    .s_o   (s_c),
    .d_o   (d_c),
    .p_nx  (p_nx),
    .q_nx  (q_nx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_buf     <= '{default: '0};
      q_buf     <= '{default: '0};
      out_valid <= 1'b0;
      out_hcol  <= 1'b0;
      out_lo    <= '0;
      out_hi    <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= in_valid && !in_tag.s0;
      out_last  <= in_valid && !in_tag.s0 && in_tag.last;
      if (in_valid) begin
        p_buf[0] <= p_nx;
        q_buf[0] <= q_nx;
        for (int unsigned i = 1; i < N; i++) begin
          p_buf[i] <= p_buf[i-1];
          q_buf[i] <= q_buf[i-1];
        end
        out_hcol <= in_hcol;
        out_lo   <= s_c;
        out_hi   <= d_c;
      end
    end
  end

endmodule
