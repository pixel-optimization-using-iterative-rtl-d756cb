// ipc_pkg: types and constants shared by the iterative pixel compression
// (IPC) pipeline. Pixels are unsigned grey levels of PIX_W bits; wavelet
// coefficients are signed and two bits wider than a pixel plus a sign bit,
// which holds the sum or difference of four pixels exactly. Frame sizes are
// module parameters; the 640x480 default is the image size used for most of
// the published timing results. The pixel width of 8 bits is a choice of
// this design (grey-level images are assumed to be 8-bit).
package ipc_pkg;
  localparam int unsigned PIX_W = 8;
  localparam int unsigned COEF_W = PIX_W + 3;
  localparam int unsigned DEF_WIDTH = 640;
  localparam int unsigned DEF_HEIGHT = 480;

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // One set of first-level wavelet coefficients of a 2x2 pixel block.
  typedef struct packed {
    coef_t ll;  // a+b+c+d
    coef_t lh;  // a-b+c-d (horizontal detail)
    coef_t hl;  // a+b-c-d (vertical detail)
    coef_t hh;  // a-b-c+d (diagonal detail)
  } subbands_t;
endpackage
