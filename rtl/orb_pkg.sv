// orb_pkg: constants, types and constant tables shared by the ORB accelerator.
//
// Holds the geometry of the pipeline (border, dynamic-threshold tile size,
// window radii), the fixed-point 7x7 Gaussian kernel, the 16-pixel FAST
// Bresenham circle and the 256-pair BRIEF sampling pattern.
//
// Kernel: the sigma = 2, 7x7 Gaussian is scaled by 16 and stored with four
// fractional bits (Q8.4), so each stored integer is round(k * 256); the
// filtered pixel is round(sum(k_int * p) / 256).
//
// BRIEF pattern: the pattern used by the reference software is a fixed table
// of 256 point pairs that is not reproduced here. This design generates its
// own fixed pattern from an integer hash (see brief_coord): every coordinate
// is the sum of two values in [0,12] minus 12, i.e. a triangular
// distribution on [-12, 12], so a rotated point stays inside radius 17 and
// always falls inside the 37x37 window.
package orb_pkg;

  // Pixel and coordinate widths.
  localparam int PIX_W   = 8;
  localparam int COORD_W = 16;

  // Dynamic-threshold grid cell (pixels).
  localparam int TILE = 30;

  // Window radii: FAST circle 3, NMS 1, Gauss 3, rBRIEF window 18 (37x37),
  // orientation patch 15 (31x31 disc).
  localparam int FAST_R  = 3;
  localparam int GAUSS_R = 3;
  localparam int BRIEF_R = 18;
  localparam int MOM_R   = 15;

  // Border the host adds around the image: rBRIEF radius on the filtered
  // image plus the Gauss radius, so every pixel the rBRIEF unit reads is a
  // fully filtered one.
  localparam int BORDER = BRIEF_R + GAUSS_R;

  // Number of stream pushes between a pixel entering the accelerator and the
  // same pixel being the centre of the FAST/NMS and rBRIEF windows is
  // CENTER_ROWS * width + CENTER_COLS.
  localparam int CENTER_ROWS = BRIEF_R + GAUSS_R;      // 21
  localparam int CENTER_COLS = BRIEF_R + GAUSS_R + 1;  // 22 (one cycle Gauss->rBRIEF register)

  localparam int DESC_BITS = 256;
  localparam int SCORE_W   = 12;  // sum of 16 absolute differences of 8-bit pixels
  localparam int SINCOS_FRAC = 14; // sin/cos in signed Q1.14

  typedef logic [PIX_W-1:0]     pix_t;
  typedef logic [COORD_W-1:0]   coord_t;
  typedef logic [DESC_BITS-1:0] desc_t;

  // One descriptor waiting in the store buffer.
  typedef struct packed {
    desc_t  desc;
    coord_t x;       // column in the unpadded image
    coord_t y;       // row in the unpadded image
    logic   ini;     // survives NMS among IniThr corners
    logic   min;     // survives NMS among MinThr corners
  } orb_entry_t;

  // ---------------------------------------------------------------- Gauss
  // Integer kernel, symmetric: weight of offset (dy, dx) in -3..3.
  function automatic int gauss_coef(int dy, int dx);
    int a, b;
    int tab [4][4];
    tab[0] = '{12, 10, 7, 4};
    tab[1] = '{10,  9, 6, 3};
    tab[2] = '{ 7,  6, 4, 2};
    tab[3] = '{ 4,  3, 2, 1};
    a = (dy < 0) ? -dy : dy;
    b = (dx < 0) ? -dx : dx;
    return tab[a][b];
  endfunction

  // ---------------------------------------------------------------- FAST
  // Bresenham circle of radius 3, index 0 directly above the centre and
  // continuing clockwise. Returns dx (sel = 0) or dy (sel = 1).
  function automatic int fast_circle(int idx, int sel);
    int dx [16];
    int dy [16];
    dx = '{ 0,  1,  2,  3,  3,  3,  2,  1,  0, -1, -2, -3, -3, -3, -2, -1};
    dy = '{-3, -3, -2, -1,  0,  1,  2,  3,  3,  3,  2,  1,  0, -1, -2, -3};
    return (sel == 0) ? dx[idx] : dy[idx];
  endfunction

  // ---------------------------------------------------------------- BRIEF
  // Coordinate k (0: x1, 1: y1, 2: x2, 3: y2) of pair i.
  function automatic int brief_coord(int i, int k);
    logic [31:0] h;
    int a, b;
    h = 32'(i * 4 + k + 1) * 32'h9E37_79B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EB_CA77;
    h = h ^ (h >> 13);
    a = int'(h[7:0])   % 13;
    b = int'(h[23:16]) % 13;
    return a + b - 12;
  endfunction

  typedef logic signed [5:0] bcoord_t;
  typedef bcoord_t [4*DESC_BITS-1:0] pattern_t;

  function automatic pattern_t gen_pattern();
    pattern_t p;
    for (int i = 0; i < DESC_BITS; i++)
      for (int k = 0; k < 4; k++)
        p[4*i+k] = bcoord_t'(brief_coord(i, k));
    return p;
  endfunction

endpackage
