// dwt2d_top: single-level 2-D 5/3 lifting DWT with dual scan.
//
// Data path (one pixel pair in, one coefficient pair out per clock):
//   frame_ram --(2 pixels of one row)--> row_proc_unit --(L,H)-->
//   transpose_unit --(column pair)--> col_proc_unit --(LL,LH | HL,HH)--> out
// scan_ctrl reads the frame two rows at a time, alternating rows every clock,
// so the row unit produces coefficients of two rows at once and the column
// unit can start after one stripe instead of after the whole frame. The only
// line storage is the column unit's 2N state words.
//
// Use: write the NxN image (signed PIX_W-bit pixels, row-major, address
// row*N + col) through the load port while idle, then pulse 'start'. Output
// pairs follow stripe by stripe (rows 0/1 of the subbands first); within a
// stripe they alternate L column (out_hcol=0: out_lo=LL, out_hi=LH) and
// H column (out_hcol=1: out_lo=HL, out_hi=HH), for column pairs 0..N/2-1.
// Each subband coefficient is PIX_W+2 bits. 'frame_done' pulses with the last
// pair. The frame memory must not be written while busy.
//
// Timing: the frame takes N*N/2 + N + 2 read clocks (N + 2 of them drain the
// pipeline with zero pixels). out_valid first rises N + 8 clocks after the
// clock edge that samples 'start', then stays high for N*N/2 clocks; the last
// pair comes N*N/2 + N + 7 clocks after that edge. A new frame may be started
// once 'busy' is low.
//
// The dual scan, the three-stage RPU/TU/CPU structure and the dual-port frame
// memory follow the published architecture; holding the frame memory inside
// the top with a load port, the drain and the latency of N + 8 clocks are
// this design's own (the published description claims three clocks, which a
// causal 5/3 filter cannot reach).
module dwt2d_top
  import dwt_pkg::*;
#(
  parameter int unsigned N     = N_DEFAULT,
  parameter int unsigned PIX_W = PIX_W_DEFAULT,
  parameter int unsigned AW    = $clog2(N*N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // frame load port
  input  logic                    ld_en,
  input  logic [AW-1:0]           ld_addr,
  input  logic signed [PIX_W-1:0] ld_data,
  // control
  input  logic                    start,
  output logic                    busy,
  output logic                    frame_done,
  // coefficient stream
  output logic                    out_valid,
  output logic                    out_hcol,
  output logic signed [PIX_W+1:0] out_lo,
  output logic signed [PIX_W+1:0] out_hi
);

  // scan controller
  logic          sc_rd, sc_first, sc_zero;
  logic [AW-1:0] sc_addr_a, sc_addr_b;
  scan_tag_t     sc_tag;

  scan_ctrl #(.N(N), .AW(AW)) u_scan (
    .clk, .rst_n, .start(start && !busy),
    .busy(), .done(), .rd_en(sc_rd),
    .addr_a(sc_addr_a), .addr_b(sc_addr_b),
    .first(sc_first), .zero(sc_zero), .tag(sc_tag)
  );

  // frame memory: port A is shared between loading and reading
  logic [PIX_W-1:0] ram_a, ram_b;
  logic             ram_we;
  logic [AW-1:0]    ram_addr_a;

  assign ram_we     = ld_en && !busy;
  assign ram_addr_a = busy ? sc_addr_a : ld_addr;

  frame_ram #(.DEPTH(N*N), .W(PIX_W), .AW(AW)) u_ram (
    .clk,
    .we_a(ram_we), .addr_a(ram_addr_a), .wdata_a(ld_data), .rdata_a(ram_a),
    .addr_b(sc_addr_b), .rdata_b(ram_b)
  );

  // align the scan sideband with the memory read latency
  logic      rd_v, rd_first, rd_zero;
  scan_tag_t rd_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_v     <= 1'b0;
      rd_first <= 1'b0;
      rd_zero  <= 1'b0;
      rd_tag   <= '0;
    end else begin
      rd_v     <= sc_rd;
      rd_first <= sc_first;
      rd_zero  <= sc_zero;
      rd_tag   <= sc_tag;
    end
  end

  logic signed [PIX_W-1:0] x0, x1;
  assign x0 = rd_zero ? '0 : $signed(ram_a);
  assign x1 = rd_zero ? '0 : $signed(ram_b);

  // row processing unit
  logic                  rp_v;
  logic signed [PIX_W:0] rp_l, rp_h;
  scan_tag_t             rp_tag;

  row_proc_unit #(.PIX_W(PIX_W)) u_rpu (
    .clk, .rst_n,
    .in_valid(rd_v), .in_first(rd_first), .in_x0(x0), .in_x1(x1), .in_tag(rd_tag),
    .out_valid(rp_v), .out_l(rp_l), .out_h(rp_h), .out_tag(rp_tag)
  );

  // transpose unit
  logic                  tu_v, tu_hcol;
  logic signed [PIX_W:0] tu_a, tu_b;
  scan_tag_t             tu_tag;

  transpose_unit #(.W(PIX_W + 1)) u_tu (
    .clk, .rst_n,
    .in_valid(rp_v), .in_l(rp_l), .in_h(rp_h), .in_tag(rp_tag),
    .out_valid(tu_v), .out_hcol(tu_hcol), .out_a(tu_a), .out_b(tu_b), .out_tag(tu_tag)
  );

  // column processing unit
  logic cp_last;

  col_proc_unit #(.N(N), .W(PIX_W + 1)) u_cpu (
    .clk, .rst_n,
    .in_valid(tu_v), .in_hcol(tu_hcol), .in_a(tu_a), .in_b(tu_b), .in_tag(tu_tag),
    .out_valid(out_valid), .out_hcol(out_hcol), .out_lo(out_lo), .out_hi(out_hi),
    .out_last(cp_last)
  );

  // busy from start until the last coefficient pair has left the pipeline
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= cp_last;
      if (start && !busy) busy <= 1'b1;
      else if (cp_last)   busy <= 1'b0;
    end
  end

endmodule
