// ipc_top: iterative pixel compression (IPC) pipeline for the digital
// output of a CMOS image sensor. A raster-order stream of grey-level
// pixels (the sensor's ADC output) passes through
//   1. pixel_averaging_filter: buffer circuit + 3x3 register bank, average
//      generator (least-contrast directional mean) and SortFour clamp;
//   2. ipc_impulse_stage: iterative stage A / stage B impulse test with a
//      window grown from 3x3 to TMAX x TMAX;
//   3. haar_dwt: one-level wavelet split into LL, LH, HL, HH (brought out
//      on the sb_* ports as the coded image), with histogram_mean
//      computing the frame's mean grey level in parallel;
//   4. four subband_fifo buffers and the reconstruction, which rebuilds
//      the pixels;
//   5. output_frame_store, read by the host through rd_*.
// With bypass_i high the raw input pixels are written to the frame store
// instead of the reconstructed ones (the direct path from the sensor to
// the output memory); the processing chain keeps running either way.
// bypass_i must be held for a whole frame.
//
// Interface: in_valid_i/in_ready_o/in_pix_i carry one WIDTH x HEIGHT frame
// after another. in_ready_o drops while a stage flushes the end of a
// frame. frame_done_o pulses when the last pixel of a frame has been
// written into the frame store. Latency from the last input pixel to
// frame_done_o is about (TMAX+1)/2 rows plus the drain of the subband
// buffers. The pipeline order and the blocks follow the source's block
// diagram; stream handshakes, the bypass select and the frame-done pulse
// are this design's.
module ipc_top
  import ipc_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned HEIGHT = DEF_HEIGHT,
  parameter int unsigned TMAX = 7,
  parameter int unsigned FIFO_DEPTH = WIDTH / 4 + 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bypass_i,
  input  logic in_valid_i,
  output logic in_ready_o,
  input  pix_t in_pix_i,
  output logic sb_valid_o,
  output subbands_t sb_o,
  output logic [15:0] sb_bx_o,
  output logic [15:0] sb_by_o,
  output pix_t mean_o,
  output logic mean_valid_o,
  output logic frame_done_o,
  input  logic [15:0] rd_x_i,
  input  logic [15:0] rd_y_i,
  output pix_t rd_pix_o
);
  // Stage 1 -> stage 2
  logic f_valid, f_ready;
  pix_t f_pix;
  logic [15:0] f_x, f_y;
  logic f_flush;
  logic [2:0] f_dir;
  // Stage 2 -> wavelet
  logic m_valid;
  pix_t m_pix;
  logic [15:0] m_x, m_y;
  logic [3:0] m_level;
  logic m_replaced, m_flush;
  // Subband buffers -> reconstruction
  coef_t q_ll, q_lh, q_hl, q_hh;
  logic [3:0] q_empty, q_full;
  logic rec_pop, rec_valid;
  pix_t rec_pix;
  logic [15:0] rec_x, rec_y;
  // Raw input position for the bypass path
  logic [15:0] raw_x, raw_y;
  logic in_fire;
  // Frame store write
  logic st_we;
  logic [15:0] st_x, st_y;
  pix_t st_pix;

  pixel_averaging_filter #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_avg (
    .clk, .rst_n,
    .in_valid(in_valid_i), .in_ready(in_ready_o), .in_pix(in_pix_i),
    .out_valid(f_valid), .out_ready(f_ready), .out_pix(f_pix),
    .x_o(f_x), .y_o(f_y), .flushing_o(f_flush), .dir_o(f_dir)
  );

  ipc_impulse_stage #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .TMAX(TMAX)) u_imp (
    .clk, .rst_n,
    .in_valid(f_valid), .in_ready(f_ready), .in_pix(f_pix),
    .out_valid(m_valid), .out_ready(1'b1), .out_pix(m_pix),
    .x_o(m_x), .y_o(m_y), .level_o(m_level), .replaced_o(m_replaced),
    .flushing_o(m_flush)
  );

  histogram_mean #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_mean (
    .clk, .rst_n, .valid_i(m_valid), .pix_i(m_pix),
    .last_i((m_x == 16'(WIDTH - 1)) && (m_y == 16'(HEIGHT - 1))),
    .mean_o, .mean_valid_o
  );

  haar_dwt #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_dwt (
    .clk, .rst_n, .valid_i(m_valid), .pix_i(m_pix), .x_i(m_x), .y_i(m_y),
    .valid_o(sb_valid_o), .sb_o, .bx_o(sb_bx_o), .by_o(sb_by_o)
  );

  subband_fifo #(.DEPTH(FIFO_DEPTH)) u_buf_ll (
    .clk, .rst_n, .push_i(sb_valid_o), .data_i(sb_o.ll), .pop_i(rec_pop),
    .data_o(q_ll), .empty_o(q_empty[0]), .full_o(q_full[0]), .count_o()
  );
  subband_fifo #(.DEPTH(FIFO_DEPTH)) u_buf_lh (
    .clk, .rst_n, .push_i(sb_valid_o), .data_i(sb_o.lh), .pop_i(rec_pop),
    .data_o(q_lh), .empty_o(q_empty[1]), .full_o(q_full[1]), .count_o()
  );
  subband_fifo #(.DEPTH(FIFO_DEPTH)) u_buf_hl (
    .clk, .rst_n, .push_i(sb_valid_o), .data_i(sb_o.hl), .pop_i(rec_pop),
    .data_o(q_hl), .empty_o(q_empty[2]), .full_o(q_full[2]), .count_o()
  );
  subband_fifo #(.DEPTH(FIFO_DEPTH)) u_buf_hh (
    .clk, .rst_n, .push_i(sb_valid_o), .data_i(sb_o.hh), .pop_i(rec_pop),
    .data_o(q_hh), .empty_o(q_empty[3]), .full_o(q_full[3]), .count_o()
  );

  reconstruction #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_rec (
    .clk, .rst_n,
    .in_valid_i(q_empty == 4'b0000),
    .sb_i('{ll: q_ll, lh: q_lh, hl: q_hl, hh: q_hh}),
    .pop_o(rec_pop),
    .out_valid_o(rec_valid), .out_pix_o(rec_pix), .x_o(rec_x), .y_o(rec_y)
  );

  // Raw pixel coordinates for the direct sensor-to-memory path.
  assign in_fire = in_valid_i && in_ready_o;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raw_x <= '0;
      raw_y <= '0;
    end else if (in_fire) begin
      if (raw_x == 16'(WIDTH - 1)) begin
        raw_x <= '0;
        raw_y <= (raw_y == 16'(HEIGHT - 1)) ? '0 : raw_y + 1'b1;
      end else begin
        raw_x <= raw_x + 1'b1;
      end
    end
  end

  always_comb begin
    if (bypass_i) begin
      st_we = in_fire;
      st_x = raw_x;
      st_y = raw_y;
      st_pix = in_pix_i;
    end else begin
      st_we = rec_valid;
      st_x = rec_x;
      st_y = rec_y;
      st_pix = rec_pix;
    end
  end

  output_frame_store #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_store (
    .clk, .we_i(st_we), .wx_i(st_x), .wy_i(st_y), .wdata_i(st_pix),
    .rx_i(rd_x_i), .ry_i(rd_y_i), .rdata_o(rd_pix_o)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) frame_done_o <= 1'b0;
    else frame_done_o <= st_we && (st_x == 16'(WIDTH - 1)) && (st_y == 16'(HEIGHT - 1));
  end

  a_buffers_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    (q_empty == 4'b0000) || (q_empty == 4'b1111));
  a_buffers_not_full: assert property (@(posedge clk) disable iff (!rst_n)
    sb_valid_o |-> (q_full == 4'b0000));
endmodule
