// scan_ctrl: dual scan address generator.
//
// The frame is read in stripes of two rows. Each clock both ports of the
// dual-port frame memory are addressed with two neighbouring pixels of one
// row (port A: even column, port B: odd column), and the row alternates
// every clock between the upper and lower row of the stripe:
//   clk 1: row 2m,   pixels 2k, 2k+1      clk 2: row 2m+1, pixels 2k, 2k+1
//   clk 3: row 2m,   pixels 2k+2, 2k+3    ...
// so for N = 256 the addresses are A: 0, 256, 2, 258 ... and B: 1, 257, 3, 259 ...
//
// After the N/2 image stripes the controller issues one more stripe of zero
// pixels (rows N and N+1 of the zero-extended frame) and then one more pixel
// pair per row. These flush the one-pair delay of the row unit and the
// one-stripe delay of the column unit so that every coefficient of the frame
// leaves the pipeline; the drain costs N+2 clocks per frame. During the drain
// 'zero' is set and the pixel data must be taken as 0.
//
// The controller also computes the sideband tag of every pair (dwt_pkg):
// which row of the stripe it is, whether the row unit emits a result for it,
// whether that result lies in stripe 0, and whether it is the frame's last.
//
// Timing: a one-clock 'start' while idle begins a frame; outputs are
// registered and valid while 'rd_en' is high, N*N/2 + N + 2 clocks in a row;
// 'done' pulses with the final pair. The read order follows the published description;
// the drain and the tag are this design's choices.
module scan_ctrl
  import dwt_pkg::*;
#(
  parameter int unsigned N  = 256,
  parameter int unsigned AW = $clog2(N*N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          rd_en,
  output logic [AW-1:0] addr_a,   // even pixel of the pair
  output logic [AW-1:0] addr_b,   // odd pixel of the pair
  output logic          first,    // first pair of a row
  output logic          zero,     // drain: pixel data is zero
  output scan_tag_t     tag
);

  localparam int unsigned HALF = N / 2;
  localparam int unsigned MW   = $clog2(HALF + 2);
  localparam int unsigned KW   = (HALF > 1) ? $clog2(HALF) : 1;

  logic [MW-1:0] m;      // stripe index, 0 .. HALF+1
  logic [KW-1:0] k;      // pixel-pair index in the row
  logic          r;      // row in the stripe
  logic          final_pair;
  logic [AW-1:0] row_base;

  assign final_pair = (m == MW'(HALF + 1)) && r;
  assign row_base   = AW'((2 * m + r) * N);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      rd_en  <= 1'b0;
      addr_a <= '0;
      addr_b <= '0;
      first  <= 1'b0;
      zero   <= 1'b0;
      tag    <= '0;
      m      <= '0;
      k      <= '0;
      r      <= 1'b0;
    end else begin
      done  <= 1'b0;
      rd_en <= busy;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          m    <= '0;
          k    <= '0;
          r    <= 1'b0;
        end
      end else begin
        zero     <= (m >= MW'(HALF));
        addr_a   <= (m < MW'(HALF)) ? row_base + AW'(2 * k) : '0;
        addr_b   <= (m < MW'(HALF)) ? row_base + AW'(2 * k + 1) : '0;
        first    <= (k == '0);
        tag.slot <= r;
        tag.emit <= !((m == '0) && (k == '0));
        tag.s0   <= (k == '0) ? (m == MW'(1)) : (m == '0);
        tag.last <= final_pair;
        // advance: row alternates each clock, pair index every two clocks
        r <= !r;
        if (r) begin
          if (k == KW'(HALF - 1)) begin
            k <= '0;
            m <= m + 1'b1;
          end else begin
            k <= k + 1'b1;
          end
        end
        if (final_pair) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
