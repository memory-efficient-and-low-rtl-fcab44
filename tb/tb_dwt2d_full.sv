// tb_dwt2d_full: one complete 256x256 frame through the design at its
// default parameters. Loads a random image, runs it and compares all 65536
// subband coefficients, in output order, with the reference 2-D transform;
// also checks the latency to the first pair (N + 8 clocks), the frame time
// (N*N/2 + N + 7 clocks to the last pair) and that 'frame_done' pulses once.
module tb_dwt2d_full;
  localparam int N     = dwt_pkg::N_DEFAULT;
  localparam int PIX_W = dwt_pkg::PIX_W_DEFAULT;
  localparam int AW    = $clog2(N*N);

  logic clk = 0, rst_n = 0;
  logic ld_en = 0;
  logic [AW-1:0] ld_addr = '0;
  logic signed [PIX_W-1:0] ld_data = '0;
  logic start = 0, busy, frame_done;
  logic out_valid, out_hcol;
  logic signed [PIX_W+1:0] out_lo, out_hi;
  int checks = 0, failures = 0, n_done = 0;
  longint cyc = 0;

  dwt2d_top dut (
    .clk, .rst_n, .ld_en, .ld_addr, .ld_data, .start, .busy, .frame_done,
    .out_valid, .out_hcol, .out_lo, .out_hi
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (frame_done) n_done++;

  initial begin
    repeat (4 * N * N + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    dwt_ref_pkg::line_t img, lo, hi;
    longint t_start, t_first, t_last;
    int idx;
    img = new[N*N];
    for (int i = 0; i < N*N; i++) img[i] = $signed(PIX_W'($urandom));
    dwt_ref_pkg::dwt2d(N, img, lo, hi);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N*N; i++) begin
      @(negedge clk);
      ld_en = 1; ld_addr = AW'(i); ld_data = PIX_W'(img[i]);
    end
    @(negedge clk);
    ld_en = 0;
    start = 1;
    t_start = cyc + 1;          // the edge that samples 'start'
    @(negedge clk);
    start = 0;
    idx = 0;
    t_first = 0;
    t_last = 0;
    while (busy) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        if (idx == 0) t_first = cyc;
        if (idx < N*N/2) begin
          check($sformatf("pair %0d lo %0d exp %0d", idx, out_lo, lo[idx]), int'(out_lo) == lo[idx]);
          check($sformatf("pair %0d hi %0d exp %0d", idx, out_hi, hi[idx]), int'(out_hi) == hi[idx]);
          check($sformatf("pair %0d hcol", idx), out_hcol == (idx % 2));
        end
        idx++;
        t_last = cyc;
      end
    end
    repeat (3) @(posedge clk);
    check($sformatf("output count %0d", idx), idx == N*N/2);
    check($sformatf("latency %0d", t_first - t_start), (t_first - t_start) == N + 8);
    check($sformatf("frame time %0d", t_last - t_start), (t_last - t_start) == N*N/2 + N + 7);
    check($sformatf("frame_done pulses %0d", n_done), n_done == 1);
    $display("first pair after %0d clocks, last after %0d clocks", t_first - t_start, t_last - t_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
