// ipc_frame_runner: testbench helper that owns one ipc_top of a given
// frame size and a clock, and runs NFRAMES frames through it at full input
// rate. Frame k is a clean synthetic image with salt-and-pepper noise of
// NOISE_FIRST + k*NOISE_STEP percent. For each frame it checks the whole
// output memory against the reference filters, checks the rate (the last
// pixel reaches the output memory no sooner than WIDTH*HEIGHT clocks and
// no later than WIDTH*HEIGHT + 5*WIDTH + 64 clocks after the first pixel
// is accepted, i.e. one pixel per clock plus the pipeline's row latency),
// and prints MSE and PSNR of the noisy and of the processed image against
// the clean one. At noise levels up to 50 % the processed image must be
// closer to the clean image than the noisy input is. done rises when all
// frames are finished; checks and failures are the running totals.
module ipc_frame_runner
  import ipc_pkg::*;
  import ipc_ref_pkg::*;
#(
  parameter int W = 64,
  parameter int H = 48,
  parameter int NOISE_FIRST = 10,
  parameter int NOISE_STEP = 10,
  parameter int NFRAMES = 1
) (
  output logic done,
  output int checks,
  output int failures
);
  logic clk = 0, rst_n = 0, bypass_i = 0;
  logic in_valid_i = 0, in_ready_o;
  pix_t in_pix_i = '0;
  logic sb_valid_o, mean_valid_o, frame_done_o;
  subbands_t sb_o;
  logic [15:0] sb_bx_o, sb_by_o;
  pix_t mean_o;
  logic [15:0] rd_x_i = '0, rd_y_i = '0;
  pix_t rd_pix_o;

  ipc_top #(.WIDTH(W), .HEIGHT(H), .TMAX(7)) u_top (.*);

  always #5 clk = ~clk;

  initial begin
    img_t clean, noisy, stage1, stage2, lvl, rep, got;
    done = 0;
    checks = 0;
    failures = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NFRAMES; k++) begin
      int noise, n, cycles, frame_fails;
      real m_in, m_out;
      noise = NOISE_FIRST + k * NOISE_STEP;
      clean = make_image(W, H, 0);
      noisy = add_noise(clean, noise);
      stage1 = ref_avg_filter(noisy, W, H);
      stage2 = ref_impulse(stage1, W, H, 7, lvl, rep);
      got = new[W*H];
      n = 0;
      cycles = 0;
      frame_fails = 0;
      @(negedge clk);
      in_valid_i = 1;
      in_pix_i = pix_t'(noisy[0]);
      while (!frame_done_o) begin
        @(posedge clk);
        if (n > 0 || (in_valid_i && in_ready_o)) cycles++;
        if (in_valid_i && in_ready_o) n++;
        @(negedge clk);
        in_valid_i = (n < W*H);
        if (n < W*H) in_pix_i = pix_t'(noisy[n]);
      end
      checks++;
      if (cycles < W*H || cycles > W*H + 5*W + 64) begin
        failures++;
        $display("%0dx%0d: frame took %0d clocks", W, H, cycles);
      end
      for (int a = 0; a < W*H; a++) begin
        @(negedge clk);
        rd_x_i = 16'(a % W);
        rd_y_i = 16'(a / W);
        @(negedge clk);
        got[a] = int'(rd_pix_o);
        checks++;
        if (got[a] != stage2[a]) begin
          failures++;
          frame_fails++;
        end
      end
      m_in = mse(noisy, clean);
      m_out = mse(got, clean);
      $display("%0dx%0d noise %0d%%: %0d clocks (%0.2f ms at 10.12 ns), MSE noisy %0.1f -> out %0.1f, PSNR %0.2f -> %0.2f dB, %0d pixel mismatches",
               W, H, noise, cycles, real'(cycles) * 10.12e-6, m_in, m_out, psnr(m_in), psnr(m_out), frame_fails);
      if (noise <= 50) begin
        checks++;
        if (!(m_out < m_in)) failures++;
      end
    end
    done = 1;
  end
endmodule
