// transpose_unit: Transpose Unit (TU) between the row and column processors.
//
// The row unit delivers, on consecutive clocks, (L, H) of the upper row and
// then (L, H) of the lower row for the same column pair. The column unit needs
// vertical pairs: (L_upper, L_lower) of the L column and then
// (H_upper, H_lower) of the H column. The unit does this 2x2 transpose with
// five data registers and two 2:1 multiplexers, as in the published description:
//   r_l1, r_h1  capture L and H of the upper row  (slot 0 clock)
//   r_h2        captures H of the lower row       (slot 1 clock)
//   data3/data4 output registers, loaded through the two multiplexers:
//     after a slot 1 clock : (r_l1, L_lower)  -> L column pair
//     on the clock after   : (r_h1, r_h2)     -> H column pair
// The multiplexer select is the half-rate phase (the published design's clk_2 and
// its inverse). Here it is derived from the slot of the incoming pair and
// everything runs on the single system clock with the phase as a select;
// the published description clocks the unit with a separate half-rate clock.
//
// Timing: the L column pair appears one clock after the lower row's input,
// the H column pair one clock later; a steady stream in gives one column
// pair out every clock. out_tag.last is set only on the final H pair.
module transpose_unit
  import dwt_pkg::*;
#(
  parameter int unsigned W = 9
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_l,
  input  logic signed [W-1:0] in_h,
  input  scan_tag_t           in_tag,      // slot selects upper/lower row
  output logic                out_valid,
  output logic                out_hcol,    // 0: L column pair, 1: H column pair
  output logic signed [W-1:0] out_a,       // Data3: upper row coefficient
  output logic signed [W-1:0] out_b,       // Data4: lower row coefficient
  output scan_tag_t           out_tag
);

  logic signed [W-1:0] r_l1, r_h1, r_h2;
  logic                h_pend;      // H pair is due next clock (nclk_2 phase)
  scan_tag_t           r_tag;
  logic                lower;

  assign lower = in_valid && in_tag.slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_l1      <= '0;
      r_h1      <= '0;
      r_h2      <= '0;
      h_pend    <= 1'b0;
      r_tag     <= '0;
      out_valid <= 1'b0;
      out_hcol  <= 1'b0;
      out_a     <= '0;
      out_b     <= '0;
      out_tag   <= '0;
    end else begin
      if (in_valid && !in_tag.slot) begin
        r_l1 <= in_l;
        r_h1 <= in_h;
      end
      if (lower) begin
        r_h2  <= in_h;
        r_tag <= in_tag;
      end
      h_pend <= lower;
      // Two output multiplexers
      out_a     <= lower ? r_l1 : r_h1;
      out_b     <= lower ? in_l : r_h2;
      out_valid <= lower || h_pend;
      out_hcol  <= !lower && h_pend;
      out_tag   <= lower ? scan_tag_t'{slot: in_tag.slot, emit: in_tag.emit,
                                       s0: in_tag.s0, last: 1'b0}
                         : r_tag;
    end
  end

endmodule
