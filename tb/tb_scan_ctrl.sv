// tb_scan_ctrl: checks the dual scan read order of the controller for an
// 8x8 frame, run twice: every clock two neighbouring pixels of one row,
// rows of a stripe alternating, then a zero stripe and one more pair per row.
// Compares addresses, row-start flag, zero flag and the tag with values
// computed here from the stripe/pair/row counters, checks that the read
// burst lasts exactly N*N/2 + N + 2 clocks without a gap, that 'done'
// pulses on its last clock and that 'start' while busy is ignored.
module tb_scan_ctrl;
  localparam int N  = 8;
  localparam int AW = $clog2(N*N);
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, rd_en, first, zero;
  logic [AW-1:0] addr_a, addr_b;
  dwt_pkg::scan_tag_t tag;
  int checks = 0, failures = 0;

  scan_ctrl #(.N(N)) dut (.clk, .rst_n, .start, .busy, .done, .rd_en, .addr_a, .addr_b,
                          .first, .zero, .tag);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      int n;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = (run == 1);    // held high on the second run: must not restart
      n = 0;
      // wait for the burst
      while (!rd_en) @(negedge clk);
      for (int m = 0; m <= N/2 + 1; m++) begin
        for (int k = 0; k < N/2; k++) begin
          for (int r = 0; r < 2; r++) begin
            if (m == N/2 + 1 && k > 0) break;
            chk($sformatf("run %0d m%0d k%0d r%0d rd_en", run, m, k, r), rd_en === 1'b1);
            if (m < N/2) begin
              chk($sformatf("m%0d k%0d r%0d addr_a %0d", m, k, r, addr_a),
                  int'(addr_a) == (2*m + r) * N + 2*k);
              chk($sformatf("m%0d k%0d r%0d addr_b %0d", m, k, r, addr_b),
                  int'(addr_b) == (2*m + r) * N + 2*k + 1);
            end
            chk($sformatf("m%0d k%0d r%0d zero", m, k, r), zero === (m >= N/2));
            chk($sformatf("m%0d k%0d r%0d first", m, k, r), first === (k == 0));
            chk($sformatf("m%0d k%0d r%0d slot", m, k, r), tag.slot === r[0]);
            chk($sformatf("m%0d k%0d r%0d emit", m, k, r), tag.emit === !(m == 0 && k == 0));
            chk($sformatf("m%0d k%0d r%0d s0", m, k, r),
                tag.s0 === ((k == 0) ? (m == 1) : (m == 0)));
            chk($sformatf("m%0d k%0d r%0d last", m, k, r),
                tag.last === (m == N/2 + 1 && r == 1));
            n++;
            @(negedge clk);
          end
        end
      end
      chk($sformatf("run %0d burst length %0d", run, n), n == N*N/2 + N + 2);
      chk("burst ends", rd_en === 1'b0);
      start = 0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 'done' must coincide with the last read of the burst
  always @(posedge clk) begin
    #1;
    if (done) begin
      checks++;
      if (!(rd_en && tag.last)) begin
        failures++;
        $display("FAIL done without last read");
      end
    end
  end
endmodule
