// sample_buffer: circular buffer RAM for received samples.
//
// Received samples are written at the input rate while the fractional CFO is
// still being estimated; once the angle is known they are read back, in
// order, through the CORDIC in compensation mode. This is a simple
// dual-port RAM, DEPTH words of W bits, with one write and one registered
// read per cycle (read data appears the cycle after rd_en). The caller
// wraps the addresses. Depth 256 follows the 12 x 256 register files of the
// reference implementation; holding I and Q in one word is this design's
// choice.
module sample_buffer #(
  parameter int DEPTH = 256,
  parameter int W     = 24,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
