// tb_haar_dwt: streams random 8x6 frames with idle gaps into the wavelet
// stage and checks every emitted coefficient set (LL, LH, HL, HH and block
// coordinates) against the reference Haar model, plus the number of sets
// per frame (one per 2x2 block) and that extreme pixel values do not
// overflow the coefficient width.
module tb_haar_dwt;
  import ipc_pkg::*;
  import ipc_ref_pkg::*;
  localparam int W = 8, H = 6;
  logic clk = 0, rst_n = 0, valid_i = 0, valid_o;
  pix_t pix_i = '0;
  logic [15:0] x_i = '0, y_i = '0, bx_o, by_o;
  subbands_t sb_o;
  int checks = 0, failures = 0;
  img_t src;
  int blocks;

  haar_dwt #(.WIDTH(W), .HEIGHT(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && valid_o) begin
      int ll, lh, hl, hh;
      ref_haar(src, W, int'(bx_o), int'(by_o), ll, lh, hl, hh);
      checks++;
      if (int'(sb_o.ll) != ll || int'(sb_o.lh) != lh || int'(sb_o.hl) != hl || int'(sb_o.hh) != hh ||
          int'(bx_o) != blocks % (W/2) || int'(by_o) != blocks / (W/2)) begin
        failures++;
        $display("block (%0d,%0d): %0d %0d %0d %0d exp %0d %0d %0d %0d", bx_o, by_o,
                 sb_o.ll, sb_o.lh, sb_o.hl, sb_o.hh, ll, lh, hl, hh);
      end
      blocks++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int fr = 0; fr < 3; fr++) begin
      automatic int n = 0;
      src = make_image(W, H, (fr == 2) ? 100 : 20);
      blocks = 0;
      while (n < W*H) begin
        @(negedge clk);
        valid_i = ($urandom_range(0, 2) != 0);
        pix_i = pix_t'(src[n]);
        x_i = 16'(n % W);
        y_i = 16'(n / W);
        @(posedge clk);
        if (valid_i) n++;
      end
      @(negedge clk);
      valid_i = 0;
      repeat (3) @(posedge clk);
      checks++;
      if (blocks != (W/2) * (H/2)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
