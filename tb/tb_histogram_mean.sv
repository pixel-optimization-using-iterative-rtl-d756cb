// tb_histogram_mean: streams three random 8x6 frames (with idle gaps) into
// the mean estimator and checks, one clock after each frame's last pixel,
// that the mean equals the frame's pixel sum divided by its pixel count,
// and that no other clock reports a mean.
module tb_histogram_mean;
  import ipc_pkg::*;
  localparam int W = 8, H = 6;
  logic clk = 0, rst_n = 0, valid_i = 0, last_i = 0, mean_valid_o;
  pix_t pix_i = '0, mean_o;
  int checks = 0, failures = 0;
  int means_seen = 0;

  histogram_mean #(.WIDTH(W), .HEIGHT(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int fr = 0; fr < 3; fr++) begin
      automatic int sum = 0, n = 0;
      int hi;
      hi = (fr == 2) ? 255 : 100 + fr * 100;
      while (n < W*H) begin
        @(negedge clk);
        valid_i = ($urandom_range(0, 3) != 0);
        pix_i = pix_t'($urandom_range(0, hi));
        last_i = valid_i && (n == W*H - 1);
        if (valid_i) begin
          sum += int'(pix_i);
          n++;
        end
        @(posedge clk);
        #1;
        checks++;
        if (mean_valid_o != last_i) failures++;
        if (last_i) begin
          means_seen++;
          checks++;
          if (int'(mean_o) != sum / (W*H)) begin
            failures++;
            $display("mean %0d exp %0d", mean_o, sum / (W*H));
          end
        end
      end
    end
    @(negedge clk);
    valid_i = 0;
    last_i = 0;
    checks++;
    if (means_seen != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
