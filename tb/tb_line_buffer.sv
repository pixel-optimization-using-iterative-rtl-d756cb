// tb_line_buffer: shifts random pixels into a 3-row buffer of width 8 and
// checks every column output against a history of the pixels shifted in:
// col_o[k] must be the pixel shifted in k*WIDTH shifts earlier. Shift
// enables are random, so idle cycles (no shift) are covered.
module tb_line_buffer;
  import ipc_pkg::*;
  localparam int W = 8;
  localparam int K = 3;
  logic clk = 0, rst_n = 0, shift = 0;
  pix_t pix_i;
  pix_t col_o [K];
  int checks = 0, failures = 0;
  int hist[$];

  line_buffer #(.WIDTH(W), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pix_i = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      shift = ($urandom_range(0, 3) != 0);
      pix_i = pix_t'($urandom);
      #1;
      if (shift) begin
        for (int k = 1; k < K; k++) begin
          if (hist.size() >= k * W) begin
            checks++;
            if (col_o[k] !== pix_t'(hist[hist.size() - k*W])) begin
              failures++;
              $display("mismatch n=%0d k=%0d got %0d exp %0d", n, k, col_o[k], hist[hist.size() - k*W]);
            end
          end
        end
        checks++;
        if (col_o[0] !== pix_i) failures++;
        hist.push_back(int'(pix_i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
