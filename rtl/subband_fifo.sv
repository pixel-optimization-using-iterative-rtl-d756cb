// subband_fifo: the buffer in front of the reconstruction for one subband.
// A first-in first-out queue of DEPTH wavelet coefficients held in a
// memory array with wrap-around read and write pointers and an occupancy
// counter. push_i writes data_i, pop_i removes the oldest entry; data_o
// shows the oldest entry whenever empty_o is low (combinational read).
// Pushing into a full queue or popping an empty one is a protocol error
// and is checked by assertions. The source shows one buffer per subband;
// the FIFO form and the default depth (half a row of blocks, enough to
// absorb the bursts of one coefficient set per two pixels on odd rows
// against a reconstruction that takes four clocks per set) are this
// design's choices.
module subband_fifo
  import ipc_pkg::*;
#(
  parameter int unsigned DEPTH = DEF_WIDTH / 4 + 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push_i,
  input  coef_t data_i,
  input  logic pop_i,
  output coef_t data_o,
  output logic empty_o,
  output logic full_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  coef_t mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;

  assign empty_o = (count_o == '0);
  assign full_o = (count_o == ($bits(count_o))'(DEPTH));
  assign data_o = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (push_i) mem[wr_ptr] <= data_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count_o <= '0;
    end else begin
      if (push_i) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (pop_i) rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count_o <= count_o + ($bits(count_o))'(push_i) - ($bits(count_o))'(pop_i);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push_i |-> (!full_o || pop_i));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop_i |-> !empty_o);
endmodule
