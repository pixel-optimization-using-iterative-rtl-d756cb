// tb_subband_fifo: random pushes and pops (never pushing when full without
// a pop, never popping when empty) against a queue model. Checks the head
// value, empty, full and the occupancy every clock, and that the queue was
// both filled and emptied during the run.
module tb_subband_fifo;
  import ipc_pkg::*;
  localparam int D = 5;
  logic clk = 0, rst_n = 0, push_i = 0, pop_i = 0, empty_o, full_o;
  coef_t data_i = '0, data_o;
  logic [$clog2(D+1)-1:0] count_o;
  int checks = 0, failures = 0;
  int q[$];
  int n_full = 0, n_empty = 0;

  subband_fifo #(.DEPTH(D)) dut (.*);

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
    for (int n = 0; n < 1500; n++) begin
      int bias;
      @(negedge clk);
      bias = ((n / 100) % 2 == 0) ? 3 : 1;  // alternate filling and draining phases
      pop_i = (q.size() > 0) && ($urandom_range(0, 3) >= bias);
      push_i = ((q.size() < D) || pop_i) && ($urandom_range(0, 3) < bias);
      data_i = coef_t'($urandom_range(0, 2047));
      #1;
      checks += 4;
      if (int'(count_o) != q.size()) failures++;
      if (empty_o != (q.size() == 0)) failures++;
      if (full_o != (q.size() == D)) failures++;
      if (q.size() > 0 && int'(data_o) != q[0]) failures++;
      if (full_o) n_full++;
      if (empty_o) n_empty++;
      @(posedge clk);
      if (pop_i) void'(q.pop_front());
      if (push_i) q.push_back(int'(data_i));
    end
    checks += 2;
    if (n_full == 0) failures++;
    if (n_empty == 0) failures++;
    $display("full=%0d empty=%0d", n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
