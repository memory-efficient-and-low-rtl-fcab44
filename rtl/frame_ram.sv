// frame_ram: dual-port frame memory holding one NxN image.
//
// Port A reads or writes, port B only reads, both with a one-clock
// synchronous read latency (block-RAM style), so the dual scan can fetch two
// neighbouring pixels of a row in the same clock. Port A is also how the
// frame is loaded. The published description only names a dual-port RAM/ROM as the pixel
// source; its organisation and latency here are this design's choices.
// The array is not reset; it is written before it is read.
module frame_ram #(
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned W     = 8,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we_a,
  input  logic [AW-1:0] addr_a,
  input  logic [W-1:0]  wdata_a,
  output logic [W-1:0]  rdata_a,
  input  logic [AW-1:0] addr_b,
  output logic [W-1:0]  rdata_b
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= wdata_a;
    rdata_a <= mem[addr_a];
    rdata_b <= mem[addr_b];
  end

endmodule
