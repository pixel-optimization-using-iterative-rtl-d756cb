// tb_ipc_top_full: one complete frame through the IPC pipeline at its
// default size (640x480, TMAX = 7, the top's parameters untouched). A
// noisy test image is streamed in at full rate; the subband ports and the
// frame mean are checked as the frame passes, and after frame_done the
// whole 640x480 output memory is read back and compared with the
// reference averaging filter followed by the reference impulse stage.
// Mechanism counts are printed for information.
module tb_ipc_top_full;
  import ipc_pkg::*;
  import ipc_ref_pkg::*;
  localparam int W = DEF_WIDTH, H = DEF_HEIGHT, TMAX = 7;
  localparam int NS = (TMAX - 1) / 2;
  localparam int WATCHDOG = 2000000;

  logic clk = 0, rst_n = 0, bypass_i = 0;
  logic in_valid_i = 0, in_ready_o;
  pix_t in_pix_i = '0;
  logic sb_valid_o, mean_valid_o, frame_done_o;
  subbands_t sb_o;
  logic [15:0] sb_bx_o, sb_by_o;
  pix_t mean_o;
  logic [15:0] rd_x_i = '0, rd_y_i = '0;
  pix_t rd_pix_o;

  int checks = 0, failures = 0;
  img_t src, stage1, stage2, lvl, rep;
  int blocks = 0, means = 0, done_seen = 0, frames_fed = 0;
  img_t exp_q[$];       // filtered image of every frame still in flight
  int exp_mean_q[$];
  int n_dir [5];
  int n_clamp_lo = 0, n_clamp_hi = 0, n_flush = 0, n_backpressure = 0;
  int n_enlarge = 0, n_replace = 0, n_tmax = 0, n_buffered = 0, n_bypass = 0;

  ipc_top u_top (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, sampled from inside the pipeline.
  always @(posedge clk) begin
    if (rst_n) begin
      if (u_top.u_avg.out_valid && u_top.f_ready && !u_top.u_avg.border) begin
        n_dir[u_top.u_avg.dir_o]++;
        if (u_top.u_avg.s2 > u_top.u_avg.f_bar) n_clamp_lo++;
        else if (u_top.u_avg.s3 < u_top.u_avg.f_bar) n_clamp_hi++;
      end
      if (u_top.u_avg.flushing_o || u_top.u_imp.flushing_o) n_flush++;
      if (u_top.u_avg.out_valid && !u_top.f_ready) n_backpressure++;
      if (u_top.m_valid) begin
        if (u_top.m_level > 0 && u_top.m_level < 4'(NS)) n_enlarge++;
        if (u_top.m_replaced) n_replace++;
        if (u_top.m_level == 4'(NS) && u_top.u_imp.fits[NS-1]) n_tmax++;
      end
      if (u_top.u_buf_ll.count_o > 1) n_buffered++;
    end
  end

  // Subband and mean monitors.
  always @(posedge clk) begin
    if (rst_n && sb_valid_o) begin
      int ll, lh, hl, hh;
      img_t cur;
      cur = exp_q[0];
      ref_haar(cur, W, int'(sb_bx_o), int'(sb_by_o), ll, lh, hl, hh);
      checks++;
      if (int'(sb_o.ll) != ll || int'(sb_o.lh) != lh || int'(sb_o.hl) != hl || int'(sb_o.hh) != hh ||
          int'(sb_bx_o) != blocks % (W/2) || int'(sb_by_o) != blocks / (W/2)) begin
        failures++;
        $display("subband mismatch at block (%0d,%0d)", sb_bx_o, sb_by_o);
      end
      blocks++;
      if (blocks == (W/2) * (H/2)) begin
        blocks = 0;
        void'(exp_q.pop_front());
      end
    end
    if (rst_n && mean_valid_o) begin
      checks++;
      means++;
      if (int'(mean_o) != exp_mean_q[0]) begin
        failures++;
        $display("mean %0d exp %0d", mean_o, exp_mean_q[0]);
      end
      void'(exp_mean_q.pop_front());
    end
    if (rst_n && frame_done_o) done_seen++;
  end

  // Streams one frame. With drain = 0 the task returns as soon as the last
  // pixel is accepted, so the next frame follows back to back (only its
  // coefficient sets and mean are checked); with drain = 1 it waits for
  // the pipeline to empty and reads the whole frame store back.
  task automatic run_frame(input int noise, input bit gaps, input bit bypass, input bit drain);
    int n, sum, fails_before;
    src = make_image(W, H, noise);
    stage1 = ref_avg_filter(src, W, H);
    stage2 = ref_impulse(stage1, W, H, TMAX, lvl, rep);
    sum = 0;
    foreach (stage2[i]) sum += stage2[i];
    exp_q.push_back(stage2);
    exp_mean_q.push_back(sum / (W*H));
    frames_fed++;
    fails_before = failures;
    bypass_i = bypass;
    if (bypass) n_bypass++;
    n = 0;
    while (n < W*H) begin
      @(negedge clk);
      in_valid_i = gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
      in_pix_i = pix_t'(src[n]);
      @(posedge clk);
      if (in_valid_i && in_ready_o) n++;
    end
    if (!drain) return;
    @(negedge clk);
    in_valid_i = 0;
    // Wait for the pipeline to drain (the frame store's last write in
    // normal mode; in bypass mode the filtered chain must still finish).
    while (done_seen != frames_fed || exp_q.size() != 0) @(posedge clk);
    repeat (4) @(posedge clk);
    for (int a = 0; a < W*H; a++) begin
      int expv;
      @(negedge clk);
      rd_x_i = 16'(a % W);
      rd_y_i = 16'(a / W);
      @(negedge clk);
      expv = bypass ? src[a] : stage2[a];
      checks++;
      if (int'(rd_pix_o) != expv) begin
        failures++;
        if (failures - fails_before < 5)
          $display("store (%0d,%0d) = %0d exp %0d", a % W, a / W, rd_pix_o, expv);
      end
    end
    checks++;
    if (exp_mean_q.size() != 0) failures++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(30, 0, 0, 1);
    checks++;
    if (means != 1) failures++;
    $display("directions %0d %0d %0d %0d %0d, clamp lo %0d hi %0d", n_dir[0], n_dir[1], n_dir[2],
             n_dir[3], n_dir[4], n_clamp_lo, n_clamp_hi);
    $display("flush %0d backpressure %0d enlarge %0d replace %0d tmax %0d buffered %0d bypass %0d",
             n_flush, n_backpressure, n_enlarge, n_replace, n_tmax, n_buffered, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
