// haar_dwt: iterative pixel compressive coding, first decomposition level.
// Splits the image into the four subbands LL, LH, HL and HH with an integer
// 2-D Haar wavelet over each 2x2 block
//     a b     (a at an even column of an even row)
//     c d
//   LL = a+b+c+d   LH = a-b+c-d   HL = a+b-c-d   HH = a-b-c+d
// Row filtering and column filtering are folded into one step per block.
// The transform is exact (no rounding), so reconstruction is lossless.
// The four-subband one-level wavelet decomposition follows the source; the
// Haar wavelet and the unnormalised integer form are this design's choices.
//
// Streaming: pixels arrive in raster order with coordinates (no
// backpressure; WIDTH and HEIGHT must be even). On an even row the block
// stores each pixel pair in a half-row memory of WIDTH/2 entries; on an
// odd row, at every odd column, it reads back the pair above and emits one
// set of subbands (registered, one clock later) with the block's
// coordinates (bx_o, by_o). Output rate: one block per two pixels on odd
// rows, none on even rows.
module haar_dwt
  import ipc_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned HEIGHT = DEF_HEIGHT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic valid_i,
  input  pix_t pix_i,
  input  logic [15:0] x_i,
  input  logic [15:0] y_i,
  output logic valid_o,
  output subbands_t sb_o,
  output logic [15:0] bx_o,
  output logic [15:0] by_o
);
  localparam int unsigned HW = WIDTH / 2;
  localparam int unsigned AW = (HW > 1) ? $clog2(HW) : 1;

  pix_t pair_mem [HW][2];
  pix_t left;  // pixel at the even column of the current row
  logic [AW-1:0] haddr;
  coef_t a, b, c, d;

  assign haddr = AW'(x_i >> 1);

  always_ff @(posedge clk) begin
    if (valid_i && !y_i[0] && x_i[0]) begin
      pair_mem[haddr][0] <= left;
      pair_mem[haddr][1] <= pix_i;
    end
  end

  always_comb begin
    a = coef_t'(pair_mem[haddr][0]);
    b = coef_t'(pair_mem[haddr][1]);
    c = coef_t'(left);
    d = coef_t'(pix_i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left <= '0;
      valid_o <= 1'b0;
      sb_o <= '0;
      bx_o <= '0;
      by_o <= '0;
    end else begin
      valid_o <= 1'b0;
      if (valid_i && !x_i[0]) left <= pix_i;
      if (valid_i && y_i[0] && x_i[0]) begin
        valid_o <= 1'b1;
        sb_o.ll <= a + b + c + d;
        sb_o.lh <= a - b + c - d;
        sb_o.hl <= a + b - c - d;
        sb_o.hh <= a - b - c + d;
        bx_o <= x_i >> 1;
        by_o <= y_i >> 1;
      end
    end
  end
endmodule
