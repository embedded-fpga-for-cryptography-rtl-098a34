// efpga_pkg -- constants, types and layout functions shared by the cFA eFPGA fabric.
//
// The fabric is an island-style FPGA: a W x H grid of configurable logic blocks (CLBs),
// unidirectional routing channels between them, switch blocks (SB) at every channel
// crossing, connection blocks (CB) feeding the CLB inputs, and one IO site next to every
// perimeter channel segment. Everything is programmed from one configuration memory.
//
// Coordinates. CLB (i,j) has 1 <= i <= W, 1 <= j <= H. Switch block (x,y) has
// 0 <= x <= W, 0 <= y <= H and sits at the upper-right corner of CLB (x,y).
// Horizontal channel segment chanx(x,y) (1 <= x <= W, 0 <= y <= H) runs between SB(x-1,y)
// and SB(x,y); vertical segment chany(x,y) (0 <= x <= W, 1 <= y <= H) runs between
// SB(x,y-1) and SB(x,y). A segment carries CW wires: indices 0..CW/2-1 travel east/north,
// CW/2..CW-1 travel west/south (track t is wire t or CW/2+t).
//
// Switch-block sides are numbered N=0, E=1, S=2, W=3. On an SB side, an outgoing track t
// starts a new wire (and is driven by a multiplexer) when (pos + t) % SEG_LEN == 0, pos being
// x for the E/W sides and y for the N/S sides, or when there is no opposite side to come
// from; otherwise the wire arriving on the opposite side passes straight through.
//
// Every configurable multiplexer in the fabric uses the same select encoding: the value 0
// drives 0 (unused wire or pin), the value k (1 <= k <= n) selects input k-1. This keeps an
// unprogrammed fabric free of active combinational loops.
//
// Configuration memory layout (bit 0 is shifted in first):
//   CLBs (j = 1..H, i = 1..W, row by row)   CLB_CFG_BITS each
//   CBs  (same order)                        cb_cfg_bits(CW) each
//   SBs  (y = 0..H, x = 0..W, row by row)    sb_cfg_bits(...) each
//   IO sites (bottom x=1..W, top x=1..W, left y=1..H, right y=1..H)   io_cfg_bits(CW) each
package efpga_pkg;

  // cFA slice / CLB organisation (thesis numbers)
  localparam int unsigned SLICE_INPUTS   = 6;   // A..F
  localparam int unsigned SLICE_OUTPUTS  = 2;   // S, Cout
  localparam int unsigned CFA_CFG_BITS   = 4;   // two per part
  localparam int unsigned SLICE_CFG_BITS = CFA_CFG_BITS + 2;  // + two flip-flop bypass bits
  localparam int unsigned CLB_SLICES     = 4;
  localparam int unsigned CLB_INPUTS     = CLB_SLICES * SLICE_INPUTS;    // 24
  localparam int unsigned CLB_OUTPUTS    = CLB_SLICES * SLICE_OUTPUTS;   // 8
  localparam int unsigned CLB_CFG_BITS   = CLB_SLICES * SLICE_CFG_BITS;  // 24

  // Switch-block sides
  typedef enum logic [1:0] {SIDE_N = 2'd0, SIDE_E = 2'd1, SIDE_S = 2'd2, SIDE_W = 2'd3} side_e;

  // Configuration of one part of the cFA (Fig. 2.1 of the thesis: f0 gates the first
  // input with AND, f1 forces the third input with OR).
  typedef struct packed {
    logic f1;
    logic f0;
  } cfa_part_cfg_t;

  typedef struct packed {
    cfa_part_cfg_t side2;   // carry part (D,E,F -> Cout)
    cfa_part_cfg_t side1;   // sum part   (A,B,C -> S)
  } cfa_cfg_t;

  typedef struct packed {
    logic     bypass_cout;  // 1: Cout output comes straight from the cell
    logic     bypass_s;     // 1: S output comes straight from the cell
    cfa_cfg_t cfa;
  } slice_cfg_t;

  // Bits needed to select among n inputs plus the "off" code 0.
  function automatic int unsigned sel_bits(input int unsigned n);
    return $clog2(n + 1);
  endfunction

  function automatic int unsigned cb_cfg_bits(input int unsigned cw);
    return CLB_INPUTS * sel_bits(cw);
  endfunction

  function automatic int unsigned io_cfg_bits(input int unsigned cw);
    return sel_bits(cw);
  endfunction

  function automatic bit sb_side_exists(input int x, input int y, input int s,
                                        input int w, input int h);
    case (s)
      0:       return y < h;   // N: chany(x, y+1)
      1:       return x < w;   // E: chanx(x+1, y)
      2:       return y > 0;   // S: chany(x, y)
      default: return x > 0;   // W: chanx(x, y)
    endcase
  endfunction

  function automatic bit sb_track_starts(input int x, input int y, input int s, input int t,
                                         input int w, input int h, input int seg_len);
    int pos;
    if (!sb_side_exists(x, y, s, w, h)) return 1'b0;
    if (!sb_side_exists(x, y, (s + 2) % 4, w, h)) return 1'b1;
    pos = (s == 0 || s == 2) ? y : x;
    return ((pos + t) % seg_len) == 0;
  endfunction

  // Number of IO input pads that enter the fabric through SB(x,y).
  function automatic int sb_num_io(input int x, input int y, input int w, input int h);
    int n;
    n = 0;
    if (y == 0 && x >= 1) n++;          // bottom site x
    if (y == h && x >= 1) n++;          // top site x
    if (x == 0 && y >= 1) n++;          // left site y
    if (x == w && y >= 1) n++;          // right site y
    return n;
  endfunction

  function automatic int sb_num_sides(input int x, input int y, input int w, input int h);
    int n;
    n = 0;
    for (int s = 0; s < 4; s++) if (sb_side_exists(x, y, s, w, h)) n++;
    return n;
  endfunction

  // Inputs of a starting-wire multiplexer on an SB side: SEG_LEN incoming tracks from each
  // other existing side, two CLB outputs, and the IO input pads of this SB.
  function automatic int sb_mux_inputs(input int x, input int y, input int w, input int h,
                                       input int seg_len);
    return (sb_num_sides(x, y, w, h) - 1) * seg_len + 2 + sb_num_io(x, y, w, h);
  endfunction

  function automatic int sb_cfg_bits(input int x, input int y, input int w, input int h,
                                     input int cw, input int seg_len);
    int n;
    n = 0;
    for (int s = 0; s < 4; s++)
      for (int t = 0; t < cw / 2; t++)
        if (sb_track_starts(x, y, s, t, w, h, seg_len))
          n += sel_bits(sb_mux_inputs(x, y, w, h, seg_len));
    return n;
  endfunction

  // Offsets into the configuration memory
  function automatic int clb_cfg_offset(input int i, input int j, input int w);
    return ((j - 1) * w + (i - 1)) * CLB_CFG_BITS;
  endfunction

  function automatic int cb_cfg_offset(input int i, input int j, input int w, input int h,
                                       input int cw);
    return w * h * CLB_CFG_BITS + ((j - 1) * w + (i - 1)) * cb_cfg_bits(cw);
  endfunction

  function automatic int sb_cfg_offset(input int x, input int y, input int w, input int h,
                                       input int cw, input int seg_len);
    int n;
    n = w * h * (CLB_CFG_BITS + cb_cfg_bits(cw));
    for (int yy = 0; yy <= h; yy++)
      for (int xx = 0; xx <= w; xx++)
        if (yy < y || (yy == y && xx < x)) n += sb_cfg_bits(xx, yy, w, h, cw, seg_len);
    return n;
  endfunction

  function automatic int num_io(input int w, input int h);
    return 2 * w + 2 * h;
  endfunction

  function automatic int io_cfg_offset(input int k, input int w, input int h, input int cw,
                                       input int seg_len);
    return sb_cfg_offset(w + 1, h, w, h, cw, seg_len) + k * io_cfg_bits(cw);
  endfunction

  function automatic int total_cfg_bits(input int w, input int h, input int cw,
                                        input int seg_len);
    return io_cfg_offset(num_io(w, h), w, h, cw, seg_len);
  endfunction

endpackage
