// window_gen: neighbourhood generator for one filter stage. It combines a
// buffer circuit (line_buffer, K-1 rows) with a register bank
// (register_bank, K x K) and adds the control that walks a raster-order
// pixel stream through them.
//
// Input: a valid/ready stream of pixels of one WIDTH x HEIGHT frame in
// raster order. Output: a valid/ready stream of windows, one per pixel of
// the frame in raster order, with the coordinates (x_o, y_o) of the centre
// pixel win_o[R][R], R = (K-1)/2. The window is valid R rows and R pixels
// after its centre pixel was accepted. After the last pixel of a frame the
// stage feeds R*WIDTH+R zero pixels of its own (flush, in_ready low) so the
// last rows of the frame leave the stage; then it waits for the next
// frame. Where the window reaches beyond the frame (the centre is closer
// than R to an edge) the outer window cells hold stale or wrapped pixels;
// users of the window must test the coordinates. The output register only
// moves when it is empty or being read, so backpressure on out_ready stalls
// the whole stage. All of this control is this design's own choice.
module window_gen
  import ipc_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned HEIGHT = DEF_HEIGHT,
  parameter int unsigned K = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  pix_t in_pix,
  output logic out_valid,
  input  logic out_ready,
  output pix_t win_o [K][K],
  output logic [15:0] x_o,
  output logic [15:0] y_o,
  output logic flushing_o
);
  localparam int R = (int'(K) - 1) / 2;

  logic [15:0] ix, iy;
  logic flushing, advance, win_valid, last_pos;
  pix_t shift_pix;
  pix_t col [K];
  int cx_n, cy_n;

  assign flushing = (iy >= 16'(HEIGHT));
  assign flushing_o = flushing;
  assign in_ready = !flushing && (!win_valid || out_ready);
  assign advance = (flushing || in_valid) && (!win_valid || out_ready);
  assign shift_pix = flushing ? '0 : in_pix;
  assign last_pos = (ix == 16'(R - 1)) && (iy == 16'(int'(HEIGHT) + R));

  // Centre of the window once the pixel at (ix, iy) has been shifted in.
  always_comb begin
    if (int'(ix) >= R) begin
      cx_n = int'(ix) - R;
      cy_n = int'(iy) - R;
    end else begin
      cx_n = int'(ix) - R + int'(WIDTH);
      cy_n = int'(iy) - R - 1;
    end
  end

  line_buffer #(.WIDTH(WIDTH), .K(K)) u_buffer (
    .clk, .rst_n, .shift(advance), .pix_i(shift_pix), .col_o(col)
  );

  register_bank #(.K(K)) u_regs (
    .clk, .rst_n, .shift(advance), .col_i(col), .win_o
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ix <= '0;
      iy <= '0;
      win_valid <= 1'b0;
      x_o <= '0;
      y_o <= '0;
    end else if (advance) begin
      if (last_pos) begin
        ix <= '0;
        iy <= '0;
      end else if (ix == 16'(WIDTH - 1)) begin
        ix <= '0;
        iy <= iy + 1'b1;
      end else begin
        ix <= ix + 1'b1;
      end
      win_valid <= (cy_n >= 0) && (cy_n < int'(HEIGHT));
      x_o <= 16'(cx_n);
      y_o <= 16'(cy_n);
    end else if (out_ready) begin
      win_valid <= 1'b0;
    end
  end

  assign out_valid = win_valid;
endmodule
