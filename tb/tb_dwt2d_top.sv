// tb_dwt2d_top: end-to-end test of the 2-D DWT pipeline.
//
// Loads several NxN frames (random, extreme checkerboards, constant) through
// the load port, runs each, and compares every output pair, in order, with
// the reference 2-D transform. Checks the output count per frame, the
// latency from 'start' to the first pair (N + 8 clocks), the frame time and
// that the output stream has no gaps once it has begun. It counts the
// mechanisms of the design and fails if one never occurred: row changes in
// the dual scan, row-end flushes in the row unit, L and H column pairs from
// the transpose unit, column restarts on stripe 0, and the zero drain stripe.
module tb_dwt2d_top #(
  parameter int unsigned N      = 16,
  parameter int unsigned FRAMES = 4
);
  localparam int unsigned PIX_W = 8;
  localparam int unsigned AW    = $clog2(N*N);

  logic clk = 0, rst_n = 0;
  logic ld_en = 0;
  logic [AW-1:0] ld_addr = '0;
  logic signed [PIX_W-1:0] ld_data = '0;
  logic start = 0, busy, frame_done;
  logic out_valid, out_hcol;
  logic signed [PIX_W+1:0] out_lo, out_hi;

  int checks = 0, failures = 0;
  longint cyc = 0;

  dwt2d_top #(.N(N), .PIX_W(PIX_W)) dut (
    .clk, .rst_n, .ld_en, .ld_addr, .ld_data, .start, .busy, .frame_done,
    .out_valid, .out_hcol, .out_lo, .out_hi
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (40 * N * N * FRAMES + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, observed on internal handshakes
  int n_row_switch = 0, n_row_flush = 0, n_l_pairs = 0, n_h_pairs = 0;
  int n_col_restart = 0, n_drain = 0;
  always @(posedge clk) begin
    if (dut.rd_v && dut.rd_tag.slot) n_row_switch++;
    if (dut.rd_v && dut.rd_first && dut.rd_tag.emit) n_row_flush++;
    if (dut.tu_v && !dut.tu_hcol) n_l_pairs++;
    if (dut.tu_v &&  dut.tu_hcol) n_h_pairs++;
    if (dut.tu_v && dut.tu_tag.s0) n_col_restart++;
    if (dut.rd_v && dut.rd_zero) n_drain++;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  initial begin
    dwt_ref_pkg::line_t img, lo, hi;
    img = new[N*N];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      longint t_start, t_first, t_last;
      int idx;
      bit started;
      for (int i = 0; i < N*N; i++) begin
        case (f % 4)
          0: img[i] = $signed(8'($urandom));
          1: img[i] = (((i / N) + (i % N)) % 2) ? 127 : -128;
          2: img[i] = (((i / N) + (i % N)) % 2) ? -128 : 127;
          default: img[i] = (f % 8 == 3) ? 100 : $signed(8'($urandom_range(0, 15)));
        endcase
      end
      dwt_ref_pkg::dwt2d(N, img, lo, hi);
      // load the frame
      for (int i = 0; i < N*N; i++) begin
        @(negedge clk);
        ld_en = 1; ld_addr = AW'(i); ld_data = PIX_W'(img[i]);
      end
      @(negedge clk);
      ld_en = 0;
      start = 1;
      t_start = cyc;
      @(negedge clk);
      start = 0;
      idx = 0;
      started = 0;
      t_first = 0;
      t_last = 0;
      while (busy) begin
        @(posedge clk);
        #1;
        if (out_valid) begin
          if (!started) begin
            started = 1;
            t_first = cyc;
          end
          if (idx < N*N/2) begin
            check($sformatf("frame %0d pair %0d lo %0d exp %0d", f, idx, out_lo, lo[idx]),
                  int'(out_lo) == lo[idx]);
            check($sformatf("frame %0d pair %0d hi %0d exp %0d", f, idx, out_hi, hi[idx]),
                  int'(out_hi) == hi[idx]);
            check($sformatf("frame %0d pair %0d hcol", f, idx), out_hcol == (idx % 2));
          end
          idx++;
          t_last = cyc;
        end else if (started && idx < N*N/2) begin
          check($sformatf("frame %0d gap in output after pair %0d", f, idx), 0);
        end
      end
      check($sformatf("frame %0d output count %0d", f, idx), idx == N*N/2);
      // t_start + 1 is the clock edge that samples 'start'
      check($sformatf("frame %0d latency %0d", f, t_first - t_start - 1),
            (t_first - t_start - 1) == N + 8);
      check($sformatf("frame %0d frame time %0d", f, t_last - t_start - 1),
            (t_last - t_start - 1) == N*N/2 + N + 7);
      $display("frame %0d: first output after %0d clocks, last after %0d", f,
               t_first - t_start - 1, t_last - t_start - 1);
    end
    check("mechanism: dual scan row alternation", n_row_switch > 0);
    check("mechanism: row-end flush", n_row_flush > 0);
    check("mechanism: TU L column pairs", n_l_pairs > 0);
    check("mechanism: TU H column pairs", n_h_pairs > 0);
    check("mechanism: column restart on stripe 0", n_col_restart > 0);
    check("mechanism: zero drain stripe", n_drain > 0);
    $display("row switches %0d, row flushes %0d, L pairs %0d, H pairs %0d, col restarts %0d, drain pairs %0d",
             n_row_switch, n_row_flush, n_l_pairs, n_h_pairs, n_col_restart, n_drain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
