// tb_register_bank: shifts random columns into a 3x3 register bank and
// checks the whole window after every clock against a model that keeps
// the last three columns: win_o[r][c] is column (K-1-c) shifts old, row r
// of the window taken from col_i[K-1-r].
module tb_register_bank;
  import ipc_pkg::*;
  localparam int K = 3;
  logic clk = 0, rst_n = 0, shift = 0;
  pix_t col_i [K];
  pix_t win_o [K][K];
  int checks = 0, failures = 0;
  int model [K][K];

  register_bank #(.K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < K; r++) begin
      col_i[r] = '0;
      for (int c = 0; c < K; c++) model[r][c] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      shift = ($urandom_range(0, 2) != 0);
      for (int r = 0; r < K; r++) col_i[r] = pix_t'($urandom);
      @(posedge clk);
      if (shift) begin
        for (int r = 0; r < K; r++) begin
          for (int c = 0; c < K-1; c++) model[r][c] = model[r][c+1];
          model[r][K-1] = int'(col_i[K-1-r]);
        end
      end
      #1;
      for (int r = 0; r < K; r++)
        for (int c = 0; c < K; c++) begin
          checks++;
          if (int'(win_o[r][c]) != model[r][c]) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
