// line_buffer: the buffer circuit. Holds the last K-1 rows of the frame in
// K-1 row memories of WIDTH pixels each, addressed by one shared column
// pointer. Each accepted pixel (shift=1) is written into the first row
// memory while the pixel that was stored at that column one row earlier
// moves on to the next row memory, so the memories form a chain of row
// delays. col_o presents, combinationally, the K vertically aligned pixels
// of the current column, newest row first: col_o[0] is pix_i itself,
// col_o[k] the pixel k rows above it. These columns feed the register bank;
// the write-back of each row into the next memory is the feedback loop
// between register bank and buffer circuit. Only the block's name and
// place in the pipeline come from the source; the row-memory organisation
// is this design's choice.
module line_buffer
  import ipc_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned K = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic shift,
  input  pix_t pix_i,
  output pix_t col_o [K]
);
  localparam int unsigned AW = $clog2(WIDTH);

  pix_t mem [K-1][WIDTH];
  logic [AW-1:0] ptr;

  always_comb begin
    col_o[0] = pix_i;
    for (int k = 1; k < int'(K); k++) col_o[k] = mem[k-1][ptr];
  end

  always_ff @(posedge clk) begin
    if (shift) begin
      for (int k = 0; k < int'(K) - 1; k++) mem[k][ptr] <= col_o[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (shift) ptr <= (ptr == AW'(WIDTH - 1)) ? '0 : ptr + 1'b1;
  end
endmodule
