// register_bank: K x K window of pixel registers. On each shift the window
// moves one column: every register takes the value of its right-hand
// neighbour and the right-most column loads col_i, the column delivered by
// the buffer circuit (col_i[0] is the newest row). win_o[r][c] is row r
// (0 = top, oldest row) and column c (0 = left, oldest column) of the
// window; the newest pixel therefore sits at win_o[K-1][K-1]. The source
// names the register bank as the store of the grey levels of the
// neighbourhood; the shift-register form is this design's choice.
module register_bank
  import ipc_pkg::*;
#(
  parameter int unsigned K = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic shift,
  input  pix_t col_i [K],
  output pix_t win_o [K][K]
);
  pix_t regs [K][K];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(K); r++)
        for (int c = 0; c < int'(K); c++) regs[r][c] <= '0;
    end else if (shift) begin
      for (int r = 0; r < int'(K); r++) begin
        for (int c = 0; c < int'(K) - 1; c++) regs[r][c] <= regs[r][c+1];
        regs[r][K-1] <= col_i[K-1-r];
      end
    end
  end

  assign win_o = regs;
endmodule
