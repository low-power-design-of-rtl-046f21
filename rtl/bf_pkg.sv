// bf_pkg: types and constants shared by the approximate bilateral filter.
//
// The filter works on 8-bit grey pixels over a square window of WIN x WIN
// taps (5 x 5, as drawn in the window buffer of the architecture). Weights
// are unsigned 8-bit fractions: 255 stands for 1.0. The widths of the sums
// follow from these: 25 weights need 13 bits, 25 weight*pixel products need
// 21 bits. The 8-bit weight precision is this design's choice; the source
// only asks for reduced-precision arithmetic.
package bf_pkg;

  localparam int unsigned PIX_W  = 8;                 // pixel bits
  localparam int unsigned WGT_W  = 8;                 // weight bits (255 = 1.0)
  localparam int unsigned WIN    = 5;                 // window side
  localparam int unsigned RAD    = WIN / 2;           // window radius
  localparam int unsigned NTAP   = WIN * WIN;         // taps per window
  localparam int unsigned WI_W   = PIX_W + WGT_W;     // one weight*pixel product
  localparam int unsigned SUMW_W = WGT_W + $clog2(NTAP);  // sum of weights
  localparam int unsigned SUMP_W = WI_W + $clog2(NTAP);   // sum of products
  localparam int unsigned SIG_W  = 16;                // width of 2*sigma^2 settings
  localparam int unsigned NSPAT  = 2 * RAD * RAD + 1; // spatial table: d^2 = 0..2*RAD^2

  typedef logic [PIX_W-1:0]  pixel_t;
  typedef logic [WGT_W-1:0]  weight_t;
  typedef logic [WI_W-1:0]   wprod_t;
  typedef logic [SUMW_W-1:0] sumw_t;
  typedef logic [SUMP_W-1:0] sump_t;

  // Kernel size selected at run time.
  typedef enum logic {KSIZE_3X3 = 1'b0, KSIZE_5X5 = 1'b1} ksize_e;

  // Run-time filter settings. s2_* hold 2*sigma^2 of the spatial and range
  // Gaussians, the denominators of the exponents in the filter equations.
  typedef struct packed {
    logic [SIG_W-1:0] s2_spatial;
    logic [SIG_W-1:0] s2_range;
    ksize_e           ksize;
  } bf_cfg_t;

  // Squared distance of tap t (row-major, t = row*WIN + col) from the centre.
  function automatic int unsigned tap_dist2(int unsigned t);
    int dy, dx;
    dy = int'(t / WIN) - int'(RAD);
    dx = int'(t % WIN) - int'(RAD);
    return int'(dy * dy + dx * dx);
  endfunction

  // True when tap t lies inside the centred 3 x 3 kernel.
  function automatic logic tap_in_3x3(int unsigned t);
    int dy, dx;
    dy = int'(t / WIN) - int'(RAD);
    dx = int'(t % WIN) - int'(RAD);
    return (dy >= -1) && (dy <= 1) && (dx >= -1) && (dx <= 1);
  endfunction

endpackage
