// tb_reconstruction: offers coefficient sets of a random 8x6 frame (from
// the reference Haar model) with random gaps and checks that the block
// rebuilds each pixel exactly, with the right coordinates, in block order
// top-left, top-right, bottom-left, bottom-right. A back-to-back stretch
// checks the rate: four pixels per set, one per clock, with no idle clock
// between sets.
module tb_reconstruction;
  import ipc_pkg::*;
  import ipc_ref_pkg::*;
  localparam int W = 8, H = 6;
  logic clk = 0, rst_n = 0, in_valid_i = 0, pop_o, out_valid_o;
  subbands_t sb_i;
  pix_t out_pix_o;
  logic [15:0] x_o, y_o;
  int checks = 0, failures = 0;
  img_t src;
  int outs = 0, first_out = -1, last_out = -1, cyc = 0;

  reconstruction #(.WIDTH(W), .HEIGHT(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid_o) begin
      int blk, ph, ex, ey;
      blk = (outs / 4) % ((W/2) * (H/2));
      ph = outs % 4;
      ex = 2 * (blk % (W/2)) + (ph % 2);
      ey = 2 * (blk / (W/2)) + (ph / 2);
      checks++;
      if (int'(x_o) != ex || int'(y_o) != ey || int'(out_pix_o) != src[ey*W+ex]) begin
        failures++;
        $display("out %0d at (%0d,%0d) exp %0d at (%0d,%0d)", out_pix_o, x_o, y_o, src[ey*W+ex], ex, ey);
      end
      if (first_out < 0) first_out = cyc;
      last_out = cyc;
      outs++;
    end
  end

  task automatic offer_frame(input bit gaps);
    int b = 0;
    while (b < (W/2) * (H/2)) begin
      int ll, lh, hl, hh;
      @(negedge clk);
      ref_haar(src, W, b % (W/2), b / (W/2), ll, lh, hl, hh);
      sb_i.ll = coef_t'(ll); sb_i.lh = coef_t'(lh); sb_i.hl = coef_t'(hl); sb_i.hh = coef_t'(hh);
      in_valid_i = gaps ? ($urandom_range(0, 1) != 0) : 1'b1;
      @(posedge clk);
      if (in_valid_i && pop_o) b++;
    end
    @(negedge clk);
    in_valid_i = 0;
    repeat (6) @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    src = make_image(W, H, 30);
    offer_frame(1);
    checks++;
    if (outs != W*H) failures++;
    first_out = -1;
    offer_frame(0);
    checks += 2;
    if (outs != 2*W*H) failures++;
    if (last_out - first_out != W*H - 1) begin
      failures++;
      $display("back-to-back frame spread over %0d clocks", last_out - first_out + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
