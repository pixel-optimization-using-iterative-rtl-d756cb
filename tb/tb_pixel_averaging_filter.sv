// tb_pixel_averaging_filter: streams noisy 16x12 frames through the
// de-noising stage and compares every output pixel with the reference
// filter. Frame 1 uses random input gaps and random backpressure; frame 2
// runs at full rate and checks that the whole frame, flush included, takes
// WIDTH*HEIGHT + WIDTH + 1 steps (one pixel per clock) plus the output
// register and the monitor's sampling clock. Outputs
// must arrive in raster order, each coordinate once.
module tb_pixel_averaging_filter;
  import ipc_pkg::*;
  import ipc_ref_pkg::*;
  localparam int W = 16, H = 12;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, flushing_o;
  pix_t in_pix = '0, out_pix;
  logic [15:0] x_o, y_o;
  logic [2:0] dir_o;
  int checks = 0, failures = 0;
  img_t src, exp_img;
  int out_count, stall_cycles;
  bit random_flow;

  pixel_averaging_filter #(.WIDTH(W), .HEIGHT(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor: raster order and value.
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int ex, ey;
      ex = out_count % W;
      ey = out_count / W;
      checks++;
      if (int'(x_o) != ex || int'(y_o) != ey || int'(out_pix) != exp_img[ey*W+ex]) begin
        failures++;
        $display("pixel (%0d,%0d) exp (%0d,%0d): got %0d exp %0d", x_o, y_o, ex, ey, out_pix, exp_img[ey*W+ex]);
      end
      out_count++;
    end
  end

  always @(negedge clk) out_ready <= random_flow ? ($urandom_range(0, 3) != 0) : 1'b1;

  task automatic run_frame(input int noise);
    int n, cycles;
    src = make_image(W, H, noise);
    exp_img = ref_avg_filter(src, W, H);
    out_count = 0;
    n = 0;
    cycles = 0;
    while (n < W*H) begin
      @(negedge clk);
      in_valid = random_flow ? ($urandom_range(0, 4) != 0) : 1'b1;
      in_pix = pix_t'(src[n]);
      @(posedge clk);
      cycles++;
      if (in_valid && in_ready) n++;
    end
    @(negedge clk);
    in_valid = 0;
    while (out_count < W*H) begin
      @(posedge clk);
      cycles++;
    end
    if (!random_flow) begin
      checks++;
      // Last output appears when the flush of W+1 steps ends.
      if (cycles < W*H + W + 1 + 1 || cycles > W*H + W + 1 + 2) begin
        failures++;
        $display("frame took %0d clocks, expected %0d", cycles, W*H + W + 1);
      end
    end
    repeat (3) @(posedge clk);
    checks++;
    if (out_count != W*H) failures++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    random_flow = 1;
    run_frame(20);
    random_flow = 0;
    run_frame(40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
