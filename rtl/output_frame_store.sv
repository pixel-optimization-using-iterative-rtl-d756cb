// output_frame_store: the output image memory ("output ROM" of the
// pipeline: read-only for the host, written by the pipeline). One
// WIDTH x HEIGHT array of pixels, address y*WIDTH + x, with one write port
// for the pipeline and one registered read port for the host (read data
// one clock after the address). The source only names this memory and
// shows that both the reconstructed and the raw sensor image reach it; the
// two-port array is this design's choice. Contents are not reset.
module output_frame_store
  import ipc_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned HEIGHT = DEF_HEIGHT
) (
  input  logic clk,
  input  logic we_i,
  input  logic [15:0] wx_i,
  input  logic [15:0] wy_i,
  input  pix_t wdata_i,
  input  logic [15:0] rx_i,
  input  logic [15:0] ry_i,
  output pix_t rdata_o
);
  localparam int unsigned DEPTH = WIDTH * HEIGHT;
  localparam int unsigned AW = $clog2(DEPTH);

  pix_t mem [DEPTH];
  logic [AW-1:0] waddr, raddr;

  assign waddr = AW'(32'(wy_i) * WIDTH + 32'(wx_i));
  assign raddr = AW'(32'(ry_i) * WIDTH + 32'(rx_i));

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr] <= wdata_i;
    rdata_o <= mem[raddr];
  end
endmodule
