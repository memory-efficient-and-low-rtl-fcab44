// tb_row_proc_unit: feeds the row unit with the dual scan order of several
// stripes (upper and lower row alternating every clock, rows of 2*HALF
// pixels) and checks every registered L/H pair, one clock after its input,
// against the reference 1-D lifting of each row. The last pair of each row
// must come out on the first pair of the next row in the same slot; a final
// stripe of zero pixels flushes the last rows. Pairs flagged emit=0 must not
// be reported, and the tag must travel with the data.
module tb_row_proc_unit;
  localparam int PIX_W = 8;
  localparam int HALF  = 6;        // pixel pairs per row
  localparam int ROWS  = 8;        // image rows (4 stripes)

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0;
  logic signed [PIX_W-1:0] in_x0 = '0, in_x1 = '0;
  dwt_pkg::scan_tag_t in_tag = '0, out_tag;
  logic out_valid;
  logic signed [PIX_W:0] out_l, out_h;
  int checks = 0, failures = 0;

  row_proc_unit #(.PIX_W(PIX_W)) dut (.clk, .rst_n, .in_valid, .in_first, .in_x0, .in_x1,
                                      .in_tag, .out_valid, .out_l, .out_h, .out_tag);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dwt_ref_pkg::line_t img [ROWS + 2];
    dwt_ref_pkg::line_t s [ROWS + 2];
    dwt_ref_pkg::line_t d [ROWS + 2];
    int exp_l, exp_h, exp_row;
    bit exp_v;
    for (int r = 0; r < ROWS + 2; r++) begin
      img[r] = new[2*HALF];
      for (int c = 0; c < 2*HALF; c++)
        img[r][c] = (r >= ROWS) ? 0 : (r == 2) ? ((c % 2) ? 127 : -128) : $signed(8'($urandom));
      dwt_ref_pkg::lift_line(img[r], s[r], d[r]);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // stripes 0..ROWS/2 (the last all zero)
    for (int m = 0; m <= ROWS/2; m++) begin
      for (int k = 0; k < HALF; k++) begin
        for (int r = 0; r < 2; r++) begin
          int row;
          row = 2*m + r;
          @(negedge clk);
          in_valid = 1;
          in_first = (k == 0);
          in_x0 = PIX_W'(img[row][2*k]);
          in_x1 = PIX_W'(img[row][2*k+1]);
          in_tag.slot = r;
          in_tag.emit = !(m == 0 && k == 0);
          in_tag.s0 = ($urandom % 2);
          in_tag.last = ($urandom % 2);
          // expected output
          exp_v = in_tag.emit;
          if (k == 0) begin
            exp_row = row - 2;
            if (exp_row >= 0) begin
              exp_l = s[exp_row][HALF-1];
              exp_h = d[exp_row][HALF-1];
            end
          end else begin
            exp_l = s[row][k-1];
            exp_h = d[row][k-1];
          end
          @(posedge clk);
          #1;
          checks++;
          if (out_valid !== exp_v) begin
            failures++;
            $display("valid m%0d k%0d r%0d: %b", m, k, r, out_valid);
          end
          if (exp_v) begin
            checks += 2;
            if (out_l != exp_l || out_h != exp_h) begin
              failures++;
              $display("m%0d k%0d r%0d: got %0d %0d exp %0d %0d", m, k, r, out_l, out_h, exp_l, exp_h);
            end
            if (out_tag != in_tag) begin
              failures++;
              $display("tag mismatch m%0d k%0d r%0d", m, k, r);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
