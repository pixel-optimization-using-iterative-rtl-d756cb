// ipc_impulse_stage: the iterative impulse test of the IPC scheme (stage A
// and stage B with a growing window). For the pixel W_xy at the centre of
// an S x S window T_xy, with W_min, W_med and W_max the minimum, median and
// maximum grey level in T_xy:
//   stage A: if W_min < W_med < W_max the median is not an impulse; go to
//            stage B. Otherwise enlarge the window by two (3, 5, ... TMAX)
//            and repeat; when TMAX has been tried, output W_xy.
//   stage B: if W_min < W_xy < W_max, W_xy is not an impulse and is output
//            unchanged; otherwise (W_xy equals W_min or W_max) output W_med.
// The procedure is the source's; TMAX = 7 and the hardware form are this
// design's choices. All window sizes are evaluated in parallel in one
// clock: a window_gen with a TMAX x TMAX register bank supplies the
// neighbourhood, every size computes its min, max and median (the median by
// rank counting: the element with fewer than M+1 elements below it and at
// least M+1 at or below it, M = (S*S-1)/2), and a priority chain over the
// sizes makes the stage A / stage B decision. A window size that would
// reach outside the frame counts as not available; a pixel whose 3x3
// window is not available passes unchanged.
//
// Interface: valid/ready pixel stream in and out, raster order, one frame
// of WIDTH x HEIGHT, output coordinates alongside. level_o is the number
// of stage A iterations that failed before the decision (0 = smallest
// window decided) and replaced_o is high when the output is W_med.
// Latency: (TMAX-1)/2 rows plus (TMAX-1)/2 + 1 pixels; one pixel per clock.
module ipc_impulse_stage
  import ipc_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned HEIGHT = DEF_HEIGHT,
  parameter int unsigned TMAX = 7
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  pix_t in_pix,
  output logic out_valid,
  input  logic out_ready,
  output pix_t out_pix,
  output logic [15:0] x_o,
  output logic [15:0] y_o,
  output logic [3:0] level_o,
  output logic replaced_o,
  output logic flushing_o
);
  localparam int unsigned NS = (TMAX - 1) / 2;  // number of window sizes
  localparam int RT = (int'(TMAX) - 1) / 2;

  pix_t win [TMAX][TMAX];
  pix_t center;
  pix_t w_min [NS];
  pix_t w_max [NS];
  pix_t w_med [NS];
  logic fits [NS];

  window_gen #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .K(TMAX)) u_win (
    .clk, .rst_n, .in_valid, .in_ready, .in_pix,
    .out_valid, .out_ready, .win_o(win), .x_o, .y_o, .flushing_o
  );

  assign center = win[RT][RT];

  for (genvar s = 0; s < int'(NS); s++) begin : g_size
    localparam int RS = s + 1;            // radius of this window
    localparam int S = 2 * RS + 1;        // side of this window
    localparam int N = S * S;
    localparam int M = (N - 1) / 2;       // rank of the median

    pix_t elem [N];

    always_comb begin
      for (int r = 0; r < S; r++)
        for (int c = 0; c < S; c++) elem[r*S+c] = win[RT-RS+r][RT-RS+c];
    end

    always_comb begin
      int lt, le;
      w_min[s] = elem[0];
      w_max[s] = elem[0];
      w_med[s] = elem[0];
      for (int i = 0; i < N; i++) begin
        if (elem[i] < w_min[s]) w_min[s] = elem[i];
        if (elem[i] > w_max[s]) w_max[s] = elem[i];
        lt = 0;
        le = 0;
        for (int j = 0; j < N; j++) begin
          if (elem[j] < elem[i]) lt++;
          if (elem[j] <= elem[i]) le++;
        end
        if (lt <= M && le > M) w_med[s] = elem[i];
      end
    end

    assign fits[s] = (int'(x_o) >= RS) && (int'(x_o) < int'(WIDTH) - RS) &&
                     (int'(y_o) >= RS) && (int'(y_o) < int'(HEIGHT) - RS);
  end

  // Stage A over the window sizes, smallest first, then stage B.
  always_comb begin
    logic decided;
    decided = 1'b0;
    out_pix = center;
    replaced_o = 1'b0;
    level_o = 4'(NS);
    for (int s = 0; s < int'(NS); s++) begin
      if (!decided && fits[s] && (w_min[s] < w_med[s]) && (w_med[s] < w_max[s])) begin
        decided = 1'b1;
        level_o = 4'(s);
        if ((w_min[s] < center) && (center < w_max[s])) begin
          out_pix = center;
        end else begin
          out_pix = w_med[s];
          replaced_o = 1'b1;
        end
      end
    end
  end
endmodule
