// bf_pkg: types, sizes and arithmetic shared by the subband beamformer.
//
// Number formats
//   fx_t  : 32-bit signed fixed point with 12 integer bits (sign included) and
//           20 fraction bits, Q12.20.  The 32-bit word and the 12-bit integer
//           part are the document's choice; truncation towards minus infinity
//           and saturation on overflow are this design's choice.
//   fl_t  : 32-bit binary floating point laid out like IEEE-754 single
//           (sign, 8-bit biased exponent, 23-bit fraction).  It is a reduced
//           subset: no subnormals, infinities or NaNs; results that underflow
//           flush to zero, results that overflow saturate to the largest
//           finite magnitude, and all rounding is by truncation.  It is used
//           only for the complex matrix inversion, as in the hybrid
//           fixed/floating scheme the design follows.
//   fft_t : 24-bit signed FFT sample, Q1.23 (range [-1, 1)).
// cfx_t and cfl_t are complex pairs of the above.  All functions are pure
// combinational logic and synthesize as such.
package bf_pkg;

  // ---------------------------------------------------------------- sizes
  parameter int unsigned N_MICS    = 4;   // microphones = subband matrix size
  parameter int unsigned N_SUB     = 32;  // FFT points = subbands
  parameter int unsigned FX_W      = 32;
  parameter int unsigned FX_FRAC   = 20;
  parameter int unsigned FFT_W     = 24;

  typedef logic signed [FX_W-1:0]  fx_t;
  typedef logic [31:0]             fl_t;
  typedef logic signed [FFT_W-1:0] fft_t;

  typedef struct packed { fx_t re; fx_t im; } cfx_t;
  typedef struct packed { fl_t re; fl_t im; } cfl_t;

  localparam fx_t FX_ONE = 32'sh0010_0000;
  localparam fx_t FX_MAX = 32'sh7fff_ffff;
  localparam fx_t FX_MIN = 32'sh8000_0000;
  localparam cfx_t CFX_ZERO = '0;

  // ------------------------------------------------------ fixed point Q12.20
  function automatic fx_t fx_sat64(input logic signed [63:0] v);
    if (v > 64'sh0000_0000_7fff_ffff)      return FX_MAX;
    else if (v < -64'sh0000_0000_8000_0000) return FX_MIN;
    else                                    return v[31:0];
  endfunction

  function automatic fx_t fx_add(input fx_t a, input fx_t b);
    logic signed [63:0] la, lb;
    la = 64'(a); lb = 64'(b);
    return fx_sat64(la + lb);
  endfunction

  function automatic fx_t fx_sub(input fx_t a, input fx_t b);
    logic signed [63:0] la, lb;
    la = 64'(a); lb = 64'(b);
    return fx_sat64(la - lb);
  endfunction

  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    logic signed [63:0] la, lb;
    la = 64'(a); lb = 64'(b);
    return fx_sat64((la * lb) >>> FX_FRAC);
  endfunction

  function automatic cfx_t c_add(input cfx_t a, input cfx_t b);
    cfx_t r;
    r.re = fx_add(a.re, b.re);
    r.im = fx_add(a.im, b.im);
    return r;
  endfunction

  function automatic cfx_t c_sub(input cfx_t a, input cfx_t b);
    cfx_t r;
    r.re = fx_sub(a.re, b.re);
    r.im = fx_sub(a.im, b.im);
    return r;
  endfunction

  function automatic cfx_t c_conj(input cfx_t a);
    cfx_t r;
    r.re = a.re;
    r.im = fx_sub(32'sd0, a.im);
    return r;
  endfunction

  // a * b, products summed at full width before the single rescale
  function automatic cfx_t c_mul(input cfx_t a, input cfx_t b);
    logic signed [63:0] ar, ai, br, bi;
    cfx_t r;
    ar = 64'(a.re); ai = 64'(a.im); br = 64'(b.re); bi = 64'(b.im);
    r.re = fx_sat64((ar * br - ai * bi) >>> FX_FRAC);
    r.im = fx_sat64((ar * bi + ai * br) >>> FX_FRAC);
    return r;
  endfunction

  // a * conj(b)
  function automatic cfx_t c_mulc(input cfx_t a, input cfx_t b);
    return c_mul(a, c_conj(b));
  endfunction

  // real scalar times complex
  function automatic cfx_t c_rscale(input fx_t s, input cfx_t a);
    cfx_t r;
    r.re = fx_mul(s, a.re);
    r.im = fx_mul(s, a.im);
    return r;
  endfunction

  // |a|^2
  function automatic fx_t c_abs2(input cfx_t a);
    logic signed [63:0] ar, ai;
    ar = 64'(a.re); ai = 64'(a.im);
    return fx_sat64((ar * ar + ai * ai) >>> FX_FRAC);
  endfunction

  // integer square root of a 64-bit value (bit-serial, unrolled)
  function automatic logic [31:0] isqrt64(input logic [63:0] v);
    logic [63:0] rem, root, b;
    rem  = v;
    root = '0;
    b    = 64'h4000_0000_0000_0000;
    for (int i = 0; i < 32; i++) begin
      if (rem >= root + b) begin
        rem  = rem - (root + b);
        root = (root >> 1) + b;
      end else begin
        root = root >> 1;
      end
      b = b >> 2;
    end
    return root[31:0];
  endfunction

  // square root of a non-negative Q12.20 value, result in Q12.20
  function automatic fx_t fx_sqrt(input fx_t a);
    logic [63:0] v;
    logic [31:0] r;
    if (a <= 0) return '0;
    v = {12'b0, a, 20'b0};
    r = isqrt64(v);
    return fx_t'(r);
  endfunction

  // --------------------------------------------------- reduced floating point
  function automatic fl_t fl_pack(input logic s, input int e, input logic [22:0] m);
    if (e <= 0)   return '0;
    if (e >= 255) return {s, 8'hfe, 23'h7f_ffff};
    return {s, e[7:0], m};
  endfunction

  function automatic fl_t fl_neg(input fl_t a);
    return {~a[31], a[30:0]};
  endfunction

  function automatic fl_t fl_from_fx(input fx_t a);
    logic        s;
    logic [31:0] mag, norm;
    int          p;
    if (a == 0) return '0;
    s   = a[31];
    mag = s ? 32'(-a) : 32'(a);
    p   = 0;
    for (int i = 0; i < 32; i++) if (mag[i]) p = i;
    norm = mag << (31 - p);
    return fl_pack(s, p - int'(FX_FRAC) + 127, norm[30:8]);
  endfunction

  function automatic fx_t fl_to_fx(input fl_t f);
    int          sh;
    logic [31:0] mag;
    logic [23:0] sig;
    if (f[30:23] == 8'd0) return '0;
    sig = {1'b1, f[22:0]};
    sh  = int'(f[30:23]) - 127 - 23 + int'(FX_FRAC);
    if (sh >= 8)        return f[31] ? FX_MIN : FX_MAX;
    else if (sh >= 0)   mag = {8'b0, sig} << sh;
    else if (sh > -25)  mag = {8'b0, sig} >> (-sh);
    else                mag = '0;
    return f[31] ? -fx_t'(mag) : fx_t'(mag);
  endfunction

  function automatic fl_t fl_mul(input fl_t a, input fl_t b);
    logic [47:0] p;
    int          e;
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return '0;
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) return fl_pack(a[31] ^ b[31], e + 1, p[46:24]);
    else       return fl_pack(a[31] ^ b[31], e,     p[45:23]);
  endfunction

  function automatic fl_t fl_add(input fl_t a, input fl_t b);
    fl_t         big, sml;
    int          d, e, lp;
    logic [27:0] mb, ms, sum;
    if (a[30:23] == 8'd0) return b;
    if (b[30:23] == 8'd0) return a;
    if (a[30:0] >= b[30:0]) begin big = a; sml = b; end
    else                    begin big = b; sml = a; end
    d  = int'(big[30:23]) - int'(sml[30:23]);
    e  = int'(big[30:23]);
    mb = {1'b0, 1'b1, big[22:0], 3'b0};
    ms = (d > 27) ? 28'd0 : ({1'b0, 1'b1, sml[22:0], 3'b0} >> d);
    if (big[31] == sml[31]) sum = mb + ms;
    else                    sum = mb - ms;
    if (sum == 0) return '0;
    lp = 0;
    for (int i = 0; i < 28; i++) if (sum[i]) lp = i;
    // leading one belongs at bit 26
    if (lp == 27) begin sum = sum >> 1;        e = e + 1;       end
    else          begin sum = sum << (26 - lp); e = e - (26 - lp); end
    return fl_pack(big[31], e, sum[25:3]);
  endfunction

  function automatic fl_t fl_sub(input fl_t a, input fl_t b);
    return fl_add(a, fl_neg(b));
  endfunction

  function automatic fl_t fl_div(input fl_t a, input fl_t b);
    logic [47:0] q;
    int          e;
    if (a[30:23] == 8'd0) return '0;
    if (b[30:23] == 8'd0) return {a[31] ^ b[31], 8'hfe, 23'h7f_ffff};
    q = {1'b1, a[22:0], 24'b0} / {24'b0, 1'b1, b[22:0]};
    e = int'(a[30:23]) - int'(b[30:23]) + 127;
    if (q[24]) return fl_pack(a[31] ^ b[31], e,     q[23:1]);
    else       return fl_pack(a[31] ^ b[31], e - 1, q[22:0]);
  endfunction

  function automatic cfl_t fc_add(input cfl_t a, input cfl_t b);
    cfl_t r;
    r.re = fl_add(a.re, b.re);
    r.im = fl_add(a.im, b.im);
    return r;
  endfunction

  function automatic cfl_t fc_mul(input cfl_t a, input cfl_t b);
    cfl_t r;
    r.re = fl_sub(fl_mul(a.re, b.re), fl_mul(a.im, b.im));
    r.im = fl_add(fl_mul(a.re, b.im), fl_mul(a.im, b.re));
    return r;
  endfunction

  function automatic cfl_t cfl_from_cfx(input cfx_t a);
    cfl_t r;
    r.re = fl_from_fx(a.re);
    r.im = fl_from_fx(a.im);
    return r;
  endfunction

  function automatic cfx_t cfx_from_cfl(input cfl_t a);
    cfx_t r;
    r.re = fl_to_fx(a.re);
    r.im = fl_to_fx(a.im);
    return r;
  endfunction

  // ------------------------------------------------ FFT sample <-> Q12.20
  // A Q1.23 FFT sample becomes Q12.20 by an arithmetic right shift of 3.
  function automatic fx_t fx_from_fft(input fft_t a);
    fx_t r;
    r = a;
    return r >>> 3;
  endfunction

  // Q12.20 to Q1.23 with saturation to [-1, 1)
  function automatic fft_t fft_from_fx(input fx_t a);
    if (a >= 32'sh0010_0000)       return 24'sh7f_ffff;
    else if (a < -32'sh0010_0000)  return 24'sh80_0000;
    else                           return fft_t'(a <<< 3);
  endfunction

endpackage
