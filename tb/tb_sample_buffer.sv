// tb_sample_buffer: self-checking test of the circular sample RAM.
// Writes random words at a running pointer while reading back a lagging
// pointer; each read word must appear one cycle after rd_en and equal what
// was written DEPTH/2 writes earlier. Also a wrap-around of the pointer.
module tb_sample_buffer;
  localparam int DEPTH = 256, W = 24, AW = 8;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [W-1:0] model [DEPTH];
  logic [W-1:0] expq;
  logic         pend = 0;
  int checks = 0, failures = 0;

  sample_buffer #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1200; n++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rd_data !== expq) begin
          failures++;
          $display("read %0d: got %h exp %h", n, rd_data, expq);
        end
      end
      wr_en   = 1;
      wr_addr = AW'(n);
      wr_data = W'($urandom);
      rd_en   = (n >= DEPTH / 2) && $urandom_range(0, 3) != 0;
      rd_addr = AW'(n - DEPTH / 2 + 1);
      pend    = rd_en;
      if (rd_en) expq = model[rd_addr];
      @(posedge clk);
      model[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
