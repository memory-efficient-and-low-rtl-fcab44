// tb_lift53_core: runs lines of several lengths through the lifting step,
// the state held in testbench registers, and compares every emitted low/high
// pair with the reference lifting. Lines follow each other directly, so the
// last pair of each line is produced by the 'first' step of the next one; a
// final all-zero line flushes the last. Includes extreme-value lines.
module tb_lift53_core;
  localparam int W = 8;
  logic clk = 0;
  logic first;
  logic signed [W-1:0] a, b;
  logic signed [W+2:0] p_st, q_st, p_nx, q_nx;
  logic signed [W:0] s_o, d_o;
  int checks = 0, failures = 0;

  lift53_core #(.W(W)) dut (.first, .a, .b, .p_st, .q_st, .s_o, .d_o, .p_nx, .q_nx);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dwt_ref_pkg::line_t x, s, d, ps, pd;
    bit have_prev;
    int plen;
    have_prev = 0;
    p_st = (W+3)'(dwt_pkg::P_INIT);
    q_st = (W+3)'(dwt_pkg::Q_INIT);
    for (int ln = 0; ln < 41; ln++) begin
      int len;
      len = (ln == 40) ? 2 : 2 * (1 + (ln % 9));
      x = new[len];
      for (int i = 0; i < len; i++) begin
        case (ln % 5)
          0: x[i] = (i % 2) ? 127 : -128;
          1: x[i] = (i % 2) ? -128 : 127;
          default: x[i] = $signed(8'($urandom));
        endcase
        if (ln == 40) x[i] = 0;
      end
      dwt_ref_pkg::lift_line(x, s, d);
      for (int k = 0; k < len/2; k++) begin
        first = (k == 0);
        a = W'(x[2*k]);
        b = W'(x[2*k+1]);
        #1;
        if (k == 0) begin
          if (have_prev) begin
            checks += 2;
            if (s_o != ps[plen-1] || d_o != pd[plen-1]) begin
              failures++;
              $display("line %0d flush: got %0d %0d exp %0d %0d", ln, s_o, d_o, ps[plen-1], pd[plen-1]);
            end
          end
        end else begin
          checks += 2;
          if (s_o != s[k-1] || d_o != d[k-1]) begin
            failures++;
            $display("line %0d k %0d: got %0d %0d exp %0d %0d", ln, k, s_o, d_o, s[k-1], d[k-1]);
          end
        end
        @(posedge clk);
        p_st = p_nx;
        q_st = q_nx;
      end
      have_prev = 1;
      ps = s; pd = d; plen = len / 2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
