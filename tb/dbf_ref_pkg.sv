// dbf_ref_pkg -- reference model of the deblocking filter output, used by
// the testbenches, written independently of the RTL's mode table.
// A filtered pixel at line position pos (0 = p3 ... 7 = q3) is
//   sum over taps t of c_t * x[pos + centre - t]
// where positions beyond the line take the nearest edge pixel, rounded as
// (sum + 2^(shift-1)) >> shift. Coefficients:
//   modes 4, 3 : 1 1 1 2 1 1 1 (/8)   rewrites p3..q3 (mode 4), p2..q2 (mode 3)
//   modes 2, 1 : 1 1 4 1 1     (/8)   rewrites p2..q1
//   mode 0     : 1 1 4 1 1     (/8)   rewrites p1..q1, or
//                1 2 1         (/4)   rewrites p0, q0
package dbf_ref_pkg;
  import dbf_pkg::*;

  typedef struct {
    int coef[$];
    int centre;
    int shift;
    int lo;
    int cnt;
    int n_fold;   // folding factor the CBSM+ runs this mode at
  } ref_mode_t;

  function automatic ref_mode_t ref_mode(dbf_mode_e mode);
    ref_mode_t r;
    case (mode)
      MODE4:      begin r.coef = '{1, 1, 1, 2, 1, 1, 1}; r.centre = 3; r.shift = 3; r.lo = 0; r.cnt = 8; r.n_fold = 7; end
      MODE3:      begin r.coef = '{1, 1, 1, 2, 1, 1, 1}; r.centre = 3; r.shift = 3; r.lo = 1; r.cnt = 6; r.n_fold = 7; end
      MODE2,
      MODE1:      begin r.coef = '{1, 1, 4, 1, 1};       r.centre = 2; r.shift = 3; r.lo = 1; r.cnt = 5; r.n_fold = 5; end
      MODE0_5TAP: begin r.coef = '{1, 1, 4, 1, 1};       r.centre = 2; r.shift = 3; r.lo = 2; r.cnt = 4; r.n_fold = 5; end
      default:    begin r.coef = '{1, 2, 1};             r.centre = 1; r.shift = 2; r.lo = 3; r.cnt = 2; r.n_fold = 4; end
    endcase
    return r;
  endfunction

  // true when a tap of the pixel at `pos` falls outside the line
  function automatic bit ref_replicates(dbf_mode_e mode, int pos);
    ref_mode_t r;
    r = ref_mode(mode);
    return pos + r.centre > LINE - 1 || pos + r.centre - (r.coef.size() - 1) < 0;
  endfunction

  function automatic int ref_pixel(dbf_mode_e mode, int line_px[LINE], int pos);
    ref_mode_t r;
    int acc, q;
    r = ref_mode(mode);
    acc = 0;
    foreach (r.coef[t]) begin
      q = pos + r.centre - t;
      if (q < 0) q = 0;
      if (q > LINE - 1) q = LINE - 1;
      acc += r.coef[t] * line_px[q];
    end
    return (acc + (1 << (r.shift - 1))) >>> r.shift;
  endfunction
endpackage
