// dbf_pkg -- constants, types and the filtering-mode table shared by the
// deblocking filter.
//
// The folded array has K = 3 folding sets and a maximum folding factor
// NMAX = 7, so one output word takes at most L = K*NMAX = 21 bit-level
// operations. Each filtering mode is mapped onto the array as a tap count
// k_c, a coefficient length m_c and a folding factor N with k_c*m_c = K*N:
//   modes 4 and 3 : {1,1,1,2,1,1,1}/8, k_c=7, m_c=3, N=7
//   modes 2 and 1 : {1,1,4,1,1}/8,     k_c=5, m_c=3, N=5
//   mode 0        : {1,1,4,1,1}/8 (N=5) or {1,2,1}/4 run as a 4-tap filter
//                   with c3=0, k_c=4, m_c=3, N=4
// The coefficients, tap counts, coefficient lengths and folding factors
// follow the published configuration. Which pixels of the 8-pixel line
// p3..q3 each mode rewrites, the rounding of the division and the
// replication of edge pixels for taps that fall outside the line are this
// design's choices.
package dbf_pkg;

  localparam int K      = 3;       // folding sets (FU rows)
  localparam int NMAX   = 7;       // maximum folding factor
  localparam int KC_MAX = 7;       // most taps a configuration may use
  localparam int MC_MAX = 6;       // longest coefficient a configuration may use
  localparam int PIX_W  = 8;       // pixel (input word) width
  localparam int YW     = 13;      // output word width of the array
  localparam int LINE   = 8;       // pixels p3..p0 q0..q3 across an edge
  localparam int BLK    = 4;       // a pixel block is BLK x BLK
  localparam int ID_W   = 5;       // {line[1:0], position[2:0]} of an output

  // Filtering modes. Mode 0 comes in two variants (5-tap and 3-tap).
  typedef enum logic [2:0] {
    MODE0_3TAP = 3'd0,
    MODE0_5TAP = 3'd1,
    MODE1      = 3'd2,
    MODE2      = 3'd3,
    MODE3      = 3'd4,
    MODE4      = 3'd5
  } dbf_mode_e;

  typedef logic [KC_MAX-1:0][MC_MAX-1:0] coef_t;  // coef[t] is c_t

  // Array configuration and the output window of one filtering mode.
  typedef struct packed {
    logic [3:0] n_fold;   // folding factor N
    logic [3:0] kc;       // number of taps k_c
    logic [3:0] mc;       // coefficient length m_c
    coef_t      coef;     // c_0 .. c_{k_c-1}
    logic [2:0] center;   // tap index that multiplies the pixel being filtered
    logic [1:0] shift;    // output = (sum + 2^(shift-1)) >> shift
    logic [2:0] lo;       // first rewritten line position (0 = p3)
    logic [3:0] cnt;      // number of rewritten pixels
  } mode_cfg_t;

  // Mode table. With reducible = 0 (plain CBSM) every mode runs on the
  // 7-tap, N = NMAX configuration with its coefficients centred and
  // zero-padded; with reducible = 1 (CBSM+) the folding factor shrinks
  // with the tap count.
  function automatic mode_cfg_t mode_cfg(dbf_mode_e mode, logic reducible);
    mode_cfg_t c;
    c = '0;
    c.mc = 4'd3;
    unique case (mode)
      MODE4, MODE3: begin
        c.n_fold = 4'd7; c.kc = 4'd7; c.center = 3'd3; c.shift = 2'd3;
        c.coef[0] = 6'd1; c.coef[1] = 6'd1; c.coef[2] = 6'd1; c.coef[3] = 6'd2;
        c.coef[4] = 6'd1; c.coef[5] = 6'd1; c.coef[6] = 6'd1;
        c.lo  = (mode == MODE4) ? 3'd0 : 3'd1;
        c.cnt = (mode == MODE4) ? 4'd8 : 4'd6;
      end
      MODE2, MODE1, MODE0_5TAP: begin
        c.n_fold = 4'd5; c.kc = 4'd5; c.center = 3'd2; c.shift = 2'd3;
        c.coef[0] = 6'd1; c.coef[1] = 6'd1; c.coef[2] = 6'd4;
        c.coef[3] = 6'd1; c.coef[4] = 6'd1;
        c.lo  = (mode == MODE0_5TAP) ? 3'd2 : 3'd1;
        c.cnt = (mode == MODE0_5TAP) ? 4'd4 : 4'd5;
      end
      default: begin  // MODE0_3TAP: {1,2,1} as a 4-tap filter with c3 = 0
        c.n_fold = 4'd4; c.kc = 4'd4; c.center = 3'd1; c.shift = 2'd2;
        c.coef[0] = 6'd1; c.coef[1] = 6'd2; c.coef[2] = 6'd1; c.coef[3] = 6'd0;
        c.lo = 3'd3; c.cnt = 4'd2;
      end
    endcase
    if (!reducible && c.kc != 4'd7) begin
      // pad to 7 taps, shifting the taps so the centre lands on tap 3
      logic [2:0] off;
      coef_t      padded;
      off    = 3'd3 - c.center;
      padded = '0;
      for (int t = 0; t < KC_MAX; t++)
        if (t >= int'(off) && t - int'(off) < int'(c.kc))
          padded[t] = c.coef[t - int'(off)];
      c.coef   = padded;
      c.kc     = 4'd7;
      c.n_fold = 4'd7;
      c.center = 3'd3;
    end
    return c;
  endfunction

endpackage
