// tb_col_proc_unit: feeds the column unit with column pairs of two
// back-to-back frames of 9-bit row coefficients (ROWS x N each, random and
// extreme values), stripe by stripe in the order L0, H0, L1, H1, ..., with a
// zero stripe after each frame. Checks that stripe 0 emits nothing, that
// every later stripe emits, one clock after each input, the vertical low and
// high coefficients of the previous stripe for that column, the column type
// and the 'last' flag. The second frame checks that stripe 0 restarts every
// column from the zero-extension state.
module tb_col_proc_unit;
  localparam int N    = 8;
  localparam int W    = 9;
  localparam int ROWS = 10;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_hcol = 0;
  logic signed [W-1:0] in_a = '0, in_b = '0;
  dwt_pkg::scan_tag_t in_tag = '0;
  logic out_valid, out_hcol, out_last;
  logic signed [W:0] out_lo, out_hi;
  int checks = 0, failures = 0;

  col_proc_unit #(.N(N), .W(W)) dut (.clk, .rst_n, .in_valid, .in_hcol, .in_a, .in_b, .in_tag,
                                     .out_valid, .out_hcol, .out_lo, .out_hi, .out_last);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dwt_ref_pkg::line_t col [N];
    dwt_ref_pkg::line_t s [N];
    dwt_ref_pkg::line_t d [N];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int c = 0; c < N; c++) begin
        col[c] = new[ROWS + 2];
        for (int r = 0; r < ROWS + 2; r++)
          col[c][r] = (r >= ROWS) ? 0 :
                      (f == 1 && c < 2) ? (((r % 2) ^ c) ? 255 : -255) :
                      $signed(9'($urandom_range(0, 510) - 255));
        col[c] = new[ROWS](col[c]);
        dwt_ref_pkg::lift_line(col[c], s[c], d[c]);
        col[c] = new[ROWS + 2](col[c]);
        col[c][ROWS] = 0; col[c][ROWS + 1] = 0;
      end
      for (int m = 0; m <= ROWS/2; m++) begin
        for (int c = 0; c < N; c++) begin
          @(negedge clk);
          in_valid = 1;
          in_hcol = c % 2;
          in_a = W'(col[c][2*m]);
          in_b = W'(col[c][2*m+1]);
          in_tag = '{slot: 1'b1, emit: 1'b1, s0: (m == 0), last: (m == ROWS/2 && c == N-1)};
          @(posedge clk);
          #1;
          checks++;
          if (out_valid !== (m != 0)) begin
            failures++;
            $display("f%0d m%0d c%0d valid %b", f, m, c, out_valid);
          end
          if (m != 0) begin
            checks += 4;
            if (int'(out_lo) != s[c][m-1] || int'(out_hi) != d[c][m-1]) begin
              failures++;
              $display("f%0d m%0d c%0d got %0d %0d exp %0d %0d", f, m, c, out_lo, out_hi,
                       s[c][m-1], d[c][m-1]);
            end
            if (out_hcol !== in_hcol) failures++;
            if (out_last !== in_tag.last) failures++;
          end
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
