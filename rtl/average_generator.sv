// average_generator: directional mean estimator of a 3x3 neighbourhood.
// The window is labelled
//     a b c
//     d X e
//     f g h
// with X the pixel being estimated. For each of five directions the block
// forms a contrast (absolute difference of the two end pixels) and a mean
// built only from adders and shifters:
//     0 horizontal     d-e   contrast |d-e|  mean (d+e)/2
//     1 vertical       b-g   contrast |b-g|  mean (b+g)/2
//     2 diagonal       a-h   contrast |a-h|  mean (a+h)/2
//     3 anti-diagonal  c-f   contrast |c-f|  mean (c+f)/2
//     4 upper row    a-b-c   contrast |a-c|  mean (a+2b+c)/4
// A min tree finds the smallest contrast D_min and a multiplexer passes the
// mean of that direction (ties go to the lower-numbered direction). The
// least-contrast selection, the min tree, the adder/shifter construction
// and the (a+2b+c)/4 term (with the doubling done by a shift) follow the
// source; the choice of these five directions is this design's own.
// Purely combinational.
module average_generator
  import ipc_pkg::*;
(
  input  pix_t win_i [3][3],
  output pix_t mean_o,
  output pix_t dmin_o,
  output logic [2:0] dir_o
);
  localparam int unsigned ND = 5;

  pix_t a, b, c, d, e, f, g, h;
  pix_t contrast [ND];
  pix_t mean [ND];
  logic [PIX_W+1:0] upper_sum;

  function automatic pix_t absdiff(pix_t p, pix_t q);
    return (p > q) ? p - q : q - p;
  endfunction

  function automatic pix_t half_sum(pix_t p, pix_t q);
    logic [PIX_W:0] s;
    s = {1'b0, p} + {1'b0, q};
    return s[PIX_W:1];
  endfunction

  always_comb begin
    a = win_i[0][0]; b = win_i[0][1]; c = win_i[0][2];
    d = win_i[1][0];                  e = win_i[1][2];
    f = win_i[2][0]; g = win_i[2][1]; h = win_i[2][2];

    upper_sum = {2'b00, a} + {2'b00, c} + {1'b0, b, 1'b0};

    contrast[0] = absdiff(d, e); mean[0] = half_sum(d, e);
    contrast[1] = absdiff(b, g); mean[1] = half_sum(b, g);
    contrast[2] = absdiff(a, h); mean[2] = half_sum(a, h);
    contrast[3] = absdiff(c, f); mean[3] = half_sum(c, f);
    contrast[4] = absdiff(a, c); mean[4] = upper_sum[PIX_W+1:2];

    // Min tree: linear scan, strict less-than keeps the lowest index on ties.
    dmin_o = contrast[0];
    mean_o = mean[0];
    dir_o = '0;
    for (int k = 1; k < int'(ND); k++) begin
      if (contrast[k] < dmin_o) begin
        dmin_o = contrast[k];
        mean_o = mean[k];
        dir_o = 3'(k);
      end
    end
  end
endmodule
