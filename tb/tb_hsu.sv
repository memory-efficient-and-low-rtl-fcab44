// tb_hsu: checks the Hardwired Scaling Unit against floor division by 2 and 4
// for every value of a 10-bit input.
module tb_hsu;
  localparam int W = 10;
  logic signed [W-1:0] x, half, quarter;
  int checks = 0, failures = 0;

  hsu #(.W(W)) dut (.x, .half, .quarter);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -(1 << (W-1)); v < (1 << (W-1)); v++) begin
      x = W'(v);
      #1;
      checks += 2;
      if (int'(half) != dwt_ref_pkg::floordiv(v, 2)) begin
        failures++;
        $display("half(%0d) = %0d", v, half);
      end
      if (int'(quarter) != dwt_ref_pkg::floordiv(v, 4)) begin
        failures++;
        $display("quarter(%0d) = %0d", v, quarter);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
