// pixel_averaging_filter: the de-noising stage. A window_gen (buffer circuit
// plus 3x3 register bank) delivers the neighbourhood of every pixel; the
// average_generator picks the mean f_bar of the least-contrast direction;
// then the estimate is bounded by the four edge neighbours b, d, e, g
// (above, left, right, below). With SortFour2 and SortFour3 the second and
// third smallest of those four:
//     f_hat = SortFour2  if SortFour2 > f_bar
//             SortFour3  if SortFour3 < f_bar
//             f_bar      otherwise
// which is the clamp of the source's Eq. (1). Pixels on the one-pixel frame
// border have no full neighbourhood and pass unchanged (this design's
// choice). The filter is applied to every interior pixel.
//
// Interface: valid/ready pixel stream in, valid/ready pixel stream out with
// the output pixel's coordinates; raster order, one frame of
// WIDTH x HEIGHT. Latency: one row plus two pixels from the accepted input
// pixel to its output (plus the end-of-frame flush of one row plus one
// pixel). Throughput one pixel per clock.
module pixel_averaging_filter
  import ipc_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned HEIGHT = DEF_HEIGHT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  pix_t in_pix,
  output logic out_valid,
  input  logic out_ready,
  output pix_t out_pix,
  output logic [15:0] x_o,
  output logic [15:0] y_o,
  output logic flushing_o,
  output logic [2:0] dir_o
);
  pix_t win [3][3];
  pix_t f_bar, dmin, s2, s3;
  logic border;

  window_gen #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .K(3)) u_win (
    .clk, .rst_n, .in_valid, .in_ready, .in_pix,
    .out_valid, .out_ready, .win_o(win), .x_o, .y_o, .flushing_o
  );

  average_generator u_avg (.win_i(win), .mean_o(f_bar), .dmin_o(dmin), .dir_o);

  // SortFour of b, d, e, g: two comparator layers give min/max of each
  // pair; the second and third values are max(low pair) and min(high pair)
  // ordered.
  always_comb begin
    pix_t lo1, hi1, lo2, hi2, mid_a, mid_b;
    lo1 = (win[0][1] < win[1][0]) ? win[0][1] : win[1][0];
    hi1 = (win[0][1] < win[1][0]) ? win[1][0] : win[0][1];
    lo2 = (win[1][2] < win[2][1]) ? win[1][2] : win[2][1];
    hi2 = (win[1][2] < win[2][1]) ? win[2][1] : win[1][2];
    mid_a = (lo1 > lo2) ? lo1 : lo2;  // larger of the two minima
    mid_b = (hi1 < hi2) ? hi1 : hi2;  // smaller of the two maxima
    s2 = (mid_a < mid_b) ? mid_a : mid_b;
    s3 = (mid_a < mid_b) ? mid_b : mid_a;
  end

  assign border = (x_o == 16'd0) || (x_o == 16'(WIDTH - 1)) ||
                  (y_o == 16'd0) || (y_o == 16'(HEIGHT - 1));

  always_comb begin
    if (border) out_pix = win[1][1];
    else if (s2 > f_bar) out_pix = s2;
    else if (s3 < f_bar) out_pix = s3;
    else out_pix = f_bar;
  end
endmodule
