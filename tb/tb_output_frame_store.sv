// tb_output_frame_store: writes a whole 8x6 frame in a random order with
// random values, then reads every address back (one-clock read latency)
// and compares; rewrites a few pixels and checks that only those changed.
module tb_output_frame_store;
  import ipc_pkg::*;
  localparam int W = 8, H = 6;
  logic clk = 0, we_i = 0;
  logic [15:0] wx_i = '0, wy_i = '0, rx_i = '0, ry_i = '0;
  pix_t wdata_i = '0, rdata_o;
  int checks = 0, failures = 0;
  int model [W*H];

  output_frame_store #(.WIDTH(W), .HEIGHT(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_px(input int x, input int y, input int v);
    @(negedge clk);
    we_i = 1; wx_i = 16'(x); wy_i = 16'(y); wdata_i = pix_t'(v);
    model[y*W+x] = v;
    @(negedge clk);
    we_i = 0;
  endtask

  task automatic read_all();
    for (int a = 0; a < W*H; a++) begin
      @(negedge clk);
      rx_i = 16'(a % W); ry_i = 16'(a / W);
      @(negedge clk);
      checks++;
      if (int'(rdata_o) != model[a]) begin
        failures++;
        $display("addr %0d: %0d exp %0d", a, rdata_o, model[a]);
      end
    end
  endtask

  initial begin
    int order [W*H];
    for (int a = 0; a < W*H; a++) order[a] = a;
    order.shuffle();
    for (int a = 0; a < W*H; a++) write_px(order[a] % W, order[a] / W, $urandom_range(0, 255));
    read_all();
    for (int k = 0; k < 5; k++) write_px($urandom_range(0, W-1), $urandom_range(0, H-1), $urandom_range(0, 255));
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
