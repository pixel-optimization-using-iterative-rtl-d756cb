// reconstruction: rebuilds the image from the four subband buffers. When
// every buffer holds a coefficient set (in_valid_i) the block pops one set
// and spends four clocks on it, emitting the pixels of the 2x2 block in
// the order top-left, top-right, bottom-left, bottom-right. Two adders
// combine the subbands pairwise,
//     s1 = LL +/- LH      s2 = HL +/- HH      (+ on the left column)
// and the output logic forms (s1 + s2)/4 on the top row and (s1 - s2)/4 on
// the bottom row, the exact inverse of the integer Haar step in haar_dwt;
// a multiplexer steered by the phase counter selects the sign of each
// operation. The next set is popped in the fourth clock so a stream of
// sets gives one pixel per clock. Blocks arrive in raster order; a block
// counter supplies the pixel coordinates. The two adders, the logic and
// the output multiplexer follow the source's reconstruction hardware; the
// arithmetic that makes them an inverse Haar transform is this design's.
// Output registered: pixel valid one clock after its phase.
module reconstruction
  import ipc_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned HEIGHT = DEF_HEIGHT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid_i,
  input  subbands_t sb_i,
  output logic pop_o,
  output logic out_valid_o,
  output pix_t out_pix_o,
  output logic [15:0] x_o,
  output logic [15:0] y_o
);
  subbands_t blk;
  logic active;
  logic [1:0] phase;
  logic [15:0] bx, by;
  coef_t s1, s2, sum;

  assign pop_o = in_valid_i && (!active || phase == 2'd3);

  always_comb begin
    s1 = phase[0] ? blk.ll - blk.lh : blk.ll + blk.lh;
    s2 = phase[0] ? blk.hl - blk.hh : blk.hl + blk.hh;
    sum = phase[1] ? s1 - s2 : s1 + s2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk <= '0;
      active <= 1'b0;
      phase <= '0;
      bx <= '0;
      by <= '0;
      out_valid_o <= 1'b0;
      out_pix_o <= '0;
      x_o <= '0;
      y_o <= '0;
    end else begin
      out_valid_o <= 1'b0;
      if (pop_o) blk <= sb_i;
      if (active) begin
        out_valid_o <= 1'b1;
        out_pix_o <= PIX_W'(sum >>> 2);
        x_o <= {bx[14:0], phase[0]};
        y_o <= {by[14:0], phase[1]};
        phase <= phase + 1'b1;
        if (phase == 2'd3) begin
          active <= in_valid_i;
          if (bx == 16'(WIDTH / 2 - 1)) begin
            bx <= '0;
            by <= (by == 16'(HEIGHT / 2 - 1)) ? '0 : by + 1'b1;
          end else begin
            bx <= bx + 1'b1;
          end
        end
      end else if (in_valid_i) begin
        active <= 1'b1;
        phase <= '0;
      end
    end
  end
endmodule
