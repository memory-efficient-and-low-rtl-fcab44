// tb_frame_ram: writes a 1024-word frame through port A, then reads it back
// through both ports at once in the dual scan pattern and at random
// addresses, checking the one-clock read latency of both ports and a write
// followed by an immediate read of the same word (old data first).
module tb_frame_ram;
  localparam int DEPTH = 1024;
  localparam int W     = 8;
  localparam int AW    = $clog2(DEPTH);
  logic clk = 0, we_a = 0;
  logic [AW-1:0] addr_a = '0, addr_b = '0;
  logic [W-1:0] wdata_a = '0, rdata_a, rdata_b;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  frame_ram #(.DEPTH(DEPTH), .W(W)) dut (.clk, .we_a, .addr_a, .wdata_a, .rdata_a, .addr_b, .rdata_b);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we_a = 1; addr_a = AW'(i); wdata_a = W'($urandom);
      model[i] = wdata_a;
    end
    @(negedge clk);
    we_a = 0;
    for (int i = 0; i < 600; i++) begin
      int ea, eb;
      if (i < 300) begin
        addr_a = AW'(2*i); addr_b = AW'(2*i + 1);
      end else begin
        addr_a = AW'($urandom); addr_b = AW'($urandom);
      end
      ea = model[addr_a]; eb = model[addr_b];
      @(posedge clk);
      #1;
      checks += 2;
      if (rdata_a != W'(ea)) begin failures++; $display("port A @%0d", addr_a); end
      if (rdata_b != W'(eb)) begin failures++; $display("port B @%0d", addr_b); end
      @(negedge clk);
    end
    // write then read the same word
    addr_a = 5; addr_b = 5; we_a = 1; wdata_a = ~model[5];
    @(posedge clk);
    #1;
    checks++;
    if (rdata_b != model[5]) begin failures++; $display("read during write"); end
    @(negedge clk);
    we_a = 0;
    @(posedge clk);
    #1;
    checks += 2;
    if (rdata_a != ~model[5] || rdata_b != ~model[5]) begin failures++; $display("write 5"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
