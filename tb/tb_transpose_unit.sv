// tb_transpose_unit: drives the transpose unit with a stream of row pairs
// (upper row slot 0, lower row slot 1, each with L and H) and checks that the
// L column pair (L_upper, L_lower) leaves one clock after the lower row's
// input and the H column pair (H_upper, H_lower) the clock after that, with
// the tag of the lower row and 'last' only on the H pair. Includes a gap in
// the input stream, after which the pending H pair must still come out.
module tb_transpose_unit;
  localparam int W = 9;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [W-1:0] in_l = '0, in_h = '0;
  dwt_pkg::scan_tag_t in_tag = '0, out_tag;
  logic out_valid, out_hcol;
  logic signed [W-1:0] out_a, out_b;
  int checks = 0, failures = 0;

  transpose_unit #(.W(W)) dut (.clk, .rst_n, .in_valid, .in_l, .in_h, .in_tag,
                               .out_valid, .out_hcol, .out_a, .out_b, .out_tag);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected output queue, one entry per clock after the first input
  typedef struct { bit v; bit hcol; int a; int b; bit s0; bit last; } exp_t;
  exp_t q[$];

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      exp_t e;
      e = (q.size() > 0) ? q.pop_front() : '{0, 0, 0, 0, 0, 0};
      checks++;
      if (out_valid !== e.v) begin
        failures++;
        $display("valid: got %b exp %b", out_valid, e.v);
      end else if (e.v) begin
        checks++;
        if (out_hcol !== e.hcol || int'(out_a) != e.a || int'(out_b) != e.b ||
            out_tag.s0 !== e.s0 || out_tag.last !== e.last) begin
          failures++;
          $display("got h%b %0d %0d s0 %b last %b, exp h%b %0d %0d s0 %b last %b",
                   out_hcol, out_a, out_b, out_tag.s0, out_tag.last, e.hcol, e.a, e.b, e.s0, e.last);
        end
      end
    end
  end

  // Drive one clock of input and queue the output expected after that edge.
  int  l_up = 0, h_up = 0;               // upper-row L and H of the current column pair
  bit  h_due = 0;                         // H column pair is due on the coming edge
  exp_t h_exp;

  task automatic drive(bit v, bit slot, int l, int h, bit s0, bit last);
    exp_t e;
    @(negedge clk);
    in_valid = v; in_l = W'(l); in_h = W'(h);
    in_tag = '{slot: slot, emit: 1'b1, s0: s0, last: last};
    e = '{0, 0, 0, 0, 0, 0};
    if (v && slot) begin
      e = '{1, 0, l_up, l, s0, 0};
      h_exp = '{1, 1, h_up, h, s0, last};
    end else if (h_due) begin
      e = h_exp;
    end
    h_due = v && slot;
    if (v && !slot) begin
      l_up = l; h_up = h;
    end
    q.push_back(e);
  endtask

  initial begin
    bit s0;
    repeat (2) @(posedge clk);
    #2;
    rst_n = 1;
    for (int p = 0; p < 60; p++) begin
      s0 = $urandom % 2;
      drive(1, 0, $signed(9'($urandom)), $signed(9'($urandom)), s0, 0);
      drive(1, 1, $signed(9'($urandom)), $signed(9'($urandom)), s0, (p == 59) || (p == 30));
      if (p == 30) repeat (3) drive(0, 0, 0, 0, 0, 0);
    end
    repeat (3) drive(0, 0, 0, 0, 0, 0);
    @(posedge clk);
    #2;
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d expected outputs never checked", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
