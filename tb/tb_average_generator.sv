// tb_average_generator: drives random and hand-made 3x3 windows into the
// average generator and compares the selected mean and direction with the
// reference directional-mean model. Directed cases make each of the five
// directions the unique least-contrast one, and one case checks the
// (a+2b+c)/4 weighting.
module tb_average_generator;
  import ipc_pkg::*;
  import ipc_ref_pkg::*;
  pix_t win_i [3][3];
  pix_t mean_o, dmin_o;
  logic [2:0] dir_o;
  int checks = 0, failures = 0;
  int dir_seen [5];

  average_generator dut (.*);

  task automatic check_win(input int a, b, c, d, x, e, f, g, h);
    int exp_dir, exp_mean;
    win_i[0][0] = pix_t'(a); win_i[0][1] = pix_t'(b); win_i[0][2] = pix_t'(c);
    win_i[1][0] = pix_t'(d); win_i[1][1] = pix_t'(x); win_i[1][2] = pix_t'(e);
    win_i[2][0] = pix_t'(f); win_i[2][1] = pix_t'(g); win_i[2][2] = pix_t'(h);
    #1;
    exp_mean = ref_dir_mean(a, b, c, d, e, f, g, h, exp_dir);
    checks += 2;
    if (int'(mean_o) != exp_mean) begin
      failures++;
      $display("mean mismatch got %0d exp %0d", mean_o, exp_mean);
    end
    if (int'(dir_o) != exp_dir) failures++;
    dir_seen[exp_dir]++;
  endtask

  initial begin
    // Unique least-contrast direction for each candidate.
    check_win(10, 90, 200, 100, 0, 102, 30, 250, 180);  // d-e
    check_win(10, 100, 200, 30, 0, 230, 60, 101, 180);  // b-g
    check_win(100, 10, 200, 30, 0, 230, 60, 250, 103);  // a-h
    check_win(10, 150, 100, 30, 0, 230, 97, 250, 180);  // c-f
    check_win(80, 120, 81, 0, 0, 200, 250, 10, 160);    // a-b-c: (80+240+81)/4
    checks++;
    if (mean_o != 8'd100) failures++;
    for (int n = 0; n < 2000; n++)
      check_win($urandom_range(0,255), $urandom_range(0,255), $urandom_range(0,255),
                $urandom_range(0,255), $urandom_range(0,255), $urandom_range(0,255),
                $urandom_range(0,255), $urandom_range(0,255), $urandom_range(0,255));
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (dir_seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
