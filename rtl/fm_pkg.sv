// fm_pkg: types and constants shared by the corner detector and the
// Hamming-distance matcher.
//
// Pixels are 8-bit grey values. Gradients from the 3x3 row/column-sum
// kernels fit in 11 signed bits (+-765). The 16-pixel detection ring is the
// radius-3 digital circle; ring index k sits at angle k*22.5 degrees in image
// coordinates (x to the right, y downward), so direction d (0..7, steps of
// 45 degrees) points at ring index 2*d. Feature vectors are 512-bit binary
// descriptors, and a Hamming distance fits in 10 bits.
package fm_pkg;
  typedef logic [7:0]         pixel_t;
  typedef logic signed [10:0] grad_t;
  typedef logic [10:0]        gmag_t;
  typedef logic signed [2:0]  step_t;
  typedef logic [2:0]         dir_t;

  localparam int RING_N    = 16;
  localparam int FEATURE_BITS = 512;
  localparam int HD_W      = 10;
  localparam int COORD_W   = 16;

  typedef logic [HD_W-1:0]    hd_t;
  typedef logic [COORD_W-1:0] coord_t;

  localparam hd_t HD_NONE = '1;   // "no candidate" distance

  // Offsets of the ring pixels from the centre.
  function automatic int ring_dx(int k);
    int t[16] = '{3, 3, 2, 1, 0, -1, -2, -3, -3, -3, -2, -1, 0, 1, 2, 3};
    return t[k % 16];
  endfunction
  function automatic int ring_dy(int k);
    int t[16] = '{0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3, -3, -3, -2, -1};
    return t[k % 16];
  endfunction

  // Best / second-best candidate record of the two-level comparer.
  typedef struct packed {
    hd_t         best;
    logic [10:0] idx;
    hd_t         second;
  } top2_t;

  // Merge two top-2 records; a holds the lower indices, so it wins ties.
  function automatic top2_t top2_merge(top2_t a, top2_t b);
    top2_t r;
    if (a.best <= b.best) begin
      r.best = a.best; r.idx = a.idx;
      r.second = (a.second < b.best) ? a.second : b.best;
    end else begin
      r.best = b.best; r.idx = b.idx;
      r.second = (b.second < a.best) ? b.second : a.best;
    end
    return r;
  endfunction
endpackage
