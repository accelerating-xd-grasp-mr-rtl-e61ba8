// xdg_pkg: number formats and arithmetic shared by the XD-GRASP dataflow kernels.
//
// All kernels compute in IEEE-754 single precision, the precision the design was
// reduced to from double (32 bits per value, 64 bits per complex sample). A complex
// value is a packed pair {re, im}. The arithmetic is written as pure functions so that
// every kernel can build its datapath from the same operators:
//   fp_add / fp_sub / fp_mul / fp_div / fp_sqrt and complex helpers built on them.
// Choices of this implementation (not fixed by the algorithm): round to nearest even,
// subnormal inputs and results are flushed to zero, NaN is not produced (invalid
// operations such as sqrt of a negative number return zero), overflow saturates to
// infinity. The functions are combinational; kernels place registers around them.
// Default sizes follow the main configuration: 320x320 images, 8 respiratory phases
// and 8 receiver coils (the coil count follows from the 6.5536 MB transpose buffer:
// 8 coils x 102400 pixels x 8 bytes).
package xdg_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned NPX_DEFAULT   = 320;  // horizontal pixels
  localparam int unsigned NPY_DEFAULT   = 320;  // vertical pixels
  localparam int unsigned NTRES_DEFAULT = 8;    // respiratory phases
  localparam int unsigned NC_DEFAULT    = 8;    // receiver coils
  localparam int unsigned NX_DEFAULT    = 640;  // samples per spoke (design choice)
  localparam int unsigned NLINE_DEFAULT = 40;   // spokes per phase (design choice)

  // ---------------------------------------------------------------- types
  typedef logic [31:0] fp32_t;

  typedef struct packed {
    fp32_t re;
    fp32_t im;
  } cplx_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;

  // ---------------------------------------------------------------- helpers
  function automatic fp32_t fp_neg(fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

  function automatic logic fp_is_zero(fp32_t a);
    return a[30:23] == 8'd0;  // subnormals count as zero
  endfunction

  // Round a normalised magnitude. m holds the leading one at bit 26, the 23 fraction
  // bits at 25:3 and guard/round/sticky at 2:0. e is the biased exponent of m.
  function automatic fp32_t fp_pack(logic s, int e, logic [26:0] m);
    logic [24:0] r;
    logic        up;
    up = m[2] & (m[1] | m[0] | m[3]);
    r  = {1'b0, m[26:3]} + 25'(up);
    if (r[24]) begin
      r = r >> 1;
      e = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, 8'(e), r[22:0]};
  endfunction

  function automatic fp32_t fp_mul(fp32_t a, fp32_t b);
    logic        s;
    logic [47:0] p;
    logic [26:0] m;
    int          e;
    s = a[31] ^ b[31];
    if (fp_is_zero(a) || fp_is_zero(b)) return {s, 31'd0};
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) return {s, 8'hFF, 23'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) begin
      m = {p[47:22], |p[21:0]};
      e = e + 1;
    end else begin
      m = {p[46:21], |p[20:0]};
    end
    return fp_pack(s, e, m);
  endfunction

  function automatic fp32_t fp_add(fp32_t a, fp32_t b);
    fp32_t       bg, sml;
    logic [27:0] mb, ms, sum;
    logic [7:0]  d;
    int          e;
    logic        sticky;
    if (fp_is_zero(a)) return fp_is_zero(b) ? {a[31] & b[31], 31'd0} : b;
    if (fp_is_zero(b)) return a;
    if (a[30:0] >= b[30:0]) begin
      bg = a; sml = b;
    end else begin
      bg = b; sml = a;
    end
    if (bg[30:23] == 8'hFF) return bg;
    d  = bg[30:23] - sml[30:23];
    mb = {2'b01, bg[22:0], 3'b000};
    ms = {2'b01, sml[22:0], 3'b000};
    if (d > 8'd27) begin
      ms = 28'd1;  // only the sticky bit survives
    end else begin
      sticky = 1'b0;
      for (int i = 0; i < 28; i++)
        if (i < int'(d)) sticky = sticky | ms[i];
      ms = (ms >> d) | 28'(sticky);
    end
    e = int'(bg[30:23]);
    if (bg[31] == sml[31]) begin
      sum = mb + ms;
      if (sum[27]) begin
        sum = {1'b0, sum[27:2], sum[1] | sum[0]};
        e = e + 1;
      end
    end else begin
      sum = mb - ms;
      if (sum == 28'd0) return FP_ZERO;
      for (int i = 0; i < 27; i++) begin
        if (!sum[26]) begin
          sum = sum << 1;
          e = e - 1;
        end
      end
    end
    return fp_pack(bg[31], e, sum[26:0]);
  endfunction

  function automatic fp32_t fp_sub(fp32_t a, fp32_t b);
    return fp_add(a, fp_neg(b));
  endfunction

  function automatic fp32_t fp_div(fp32_t a, fp32_t b);
    logic        s;
    logic [50:0] n, q, rem;
    logic [26:0] m;
    int          e;
    s = a[31] ^ b[31];
    if (fp_is_zero(a)) return {s, 31'd0};
    if (fp_is_zero(b) || a[30:23] == 8'hFF) return {s, 8'hFF, 23'd0};
    if (b[30:23] == 8'hFF) return {s, 31'd0};
    n   = {1'b1, a[22:0], 27'd0};
    q   = n / 51'({1'b1, b[22:0]});
    rem = n % 51'({1'b1, b[22:0]});
    e   = int'(a[30:23]) - int'(b[30:23]) + 127;
    // quotient lies in (2^26, 2^28)
    if (q[27]) m = {q[27:2], |q[1:0] | (rem != 0)};
    else begin
      m = {q[26:1], q[0] | (rem != 0)};
      e = e - 1;
    end
    return fp_pack(s, e, m);
  endfunction

  // Square root by the bitwise (restoring) integer method on the mantissa.
  function automatic fp32_t fp_sqrt(fp32_t a);
    logic [53:0] n;
    logic [53:0] rem, res, bitv;
    logic [26:0] m;
    int          e;
    if (fp_is_zero(a) || a[31]) return FP_ZERO;
    if (a[30:23] == 8'hFF) return a;
    e = int'(a[30:23]) - 127;
    // make the exponent even; n = mantissa * 2^52 (or 2^53 for odd e)
    if (e % 2 != 0) begin
      n = {1'b0, 1'b1, a[22:0], 29'd0} << 1;
      e = e - 1;
    end else begin
      n = {1'b0, 1'b1, a[22:0], 29'd0};
    end
    // n is in [2^52, 2^54): sqrt(n) is in [2^26, 2^27)
    rem  = n;
    res  = 54'd0;
    bitv = 54'd1 << 52;
    for (int i = 0; i < 27; i++) begin
      if (rem >= res + bitv) begin
        rem = rem - (res + bitv);
        res = (res >> 1) + bitv;
      end else begin
        res = res >> 1;
      end
      bitv = bitv >> 2;
    end
    m = {res[26:1], res[0] | (rem != 0)};
    return fp_pack(1'b0, e / 2 + 127, m);
  endfunction

  // ---------------------------------------------------------------- complex
  function automatic cplx_t c_add(cplx_t a, cplx_t b);
    return '{re: fp_add(a.re, b.re), im: fp_add(a.im, b.im)};
  endfunction

  function automatic cplx_t c_sub(cplx_t a, cplx_t b);
    return '{re: fp_sub(a.re, b.re), im: fp_sub(a.im, b.im)};
  endfunction

  function automatic cplx_t c_conj(cplx_t a);
    return '{re: a.re, im: fp_neg(a.im)};
  endfunction

  function automatic cplx_t c_mul(cplx_t a, cplx_t b);
    return '{re: fp_sub(fp_mul(a.re, b.re), fp_mul(a.im, b.im)),
             im: fp_add(fp_mul(a.re, b.im), fp_mul(a.im, b.re))};
  endfunction

  // complex times real scalar
  function automatic cplx_t c_scale(cplx_t a, fp32_t k);
    return '{re: fp_mul(a.re, k), im: fp_mul(a.im, k)};
  endfunction

  // a * conj(a) = |a|^2, a real number
  function automatic fp32_t c_abs2(cplx_t a);
    return fp_add(fp_mul(a.re, a.re), fp_mul(a.im, a.im));
  endfunction

  // ---------------------------------------------------------------- constants
  // Convert an elaboration-time real to single precision (round to nearest even).
  function automatic fp32_t real_to_fp32(real r);
    logic [63:0] d;
    logic [26:0] m;
    int          e;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:27], |d[26:0]};
    return fp_pack(d[63], e, m);
  endfunction

endpackage
