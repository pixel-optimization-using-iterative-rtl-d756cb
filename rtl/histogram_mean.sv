// histogram_mean: mean grey level of a frame. The mean of the grey-level
// histogram, sum_i i*hs(i) / N_pix, equals the plain sum of all pixel
// values over the frame divided by the pixel count, so no histogram memory
// is needed: an accumulator adds every pixel of the stream and, with the
// frame's last pixel (last_i), the block divides the total by
// WIDTH*HEIGHT (a constant divider, rounded down) and pulses mean_valid_o
// for one clock. The summation form follows the source; normalising by the
// pixel count is this design's reading of the source's normalising factor.
// Latency: mean one clock after the last pixel.
module histogram_mean
  import ipc_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned HEIGHT = DEF_HEIGHT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic valid_i,
  input  pix_t pix_i,
  input  logic last_i,
  output pix_t mean_o,
  output logic mean_valid_o
);
  localparam int unsigned NPIX = WIDTH * HEIGHT;
  localparam int unsigned SW = PIX_W + $clog2(NPIX + 1);

  logic [SW-1:0] acc, total;

  assign total = acc + SW'(pix_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      mean_o <= '0;
      mean_valid_o <= 1'b0;
    end else begin
      mean_valid_o <= 1'b0;
      if (valid_i) begin
        if (last_i) begin
          acc <= '0;
          mean_o <= PIX_W'(total / SW'(NPIX));
          mean_valid_o <= 1'b1;
        end else begin
          acc <= total;
        end
      end
    end
  end
endmodule
