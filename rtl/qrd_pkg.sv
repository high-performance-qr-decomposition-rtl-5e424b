// qrd_pkg: types and IEEE754 single-precision arithmetic shared by the QR
// decomposition core.
//
// The core works on 32-bit IEEE754 binary32 numbers throughout. The
// functions below are the arithmetic of every datapath: add, multiply,
// divide and square root. Each one is correctly rounded (round to nearest,
// ties to even) for normal operands and results. Subnormal inputs are read as
// zero and results that would be subnormal are flushed to a signed zero;
// overflow gives a signed infinity and invalid operations give the quiet NaN
// 0x7FC00000. This mirrors the behaviour of hard floating-point DSP blocks,
// which the architecture targets; the operator internals are this design's
// own, written as plain combinational functions so that the pipelined
// wrappers (fp_*_r, fp_div, fp_sqrt, fp_rsqrt, mult_sub) can add registers
// behind them and leave placement of those registers to retiming.
//
// stag_t is the tag that travels with a column through the RAM read and the
// scalar datapath; vtag_t is the part of it the vector datapath carries on
// to the math unit. Indices are 16 bits wide, which bounds the matrix size
// at 65535.
package qrd_pkg;

  typedef logic [31:0] float_t;
  typedef logic [15:0] idx_t;

  localparam float_t FP_ZERO = 32'h0000_0000;
  localparam float_t FP_ONE  = 32'h3F80_0000;
  localparam float_t FP_QNAN = 32'h7FC0_0000;

  // Column tag for the scalar datapath and the RAM write-back.
  typedef struct packed {
    logic wr;      // write the result back to RAM column wr_col
    idx_t wr_col;
    logic to_vec;  // forward the result to the vector datapath
    logic first;   // first vector of a dot-product pass (latched there)
    idx_t row;     // row of R that this pass's dot products belong to
    idx_t col;     // column of R (and of A) this vector is
  } stag_t;

  // Tag carried by a dot product to the math unit.
  typedef struct packed {
    logic first;
    idx_t row;
    idx_t col;
  } vtag_t;

  function automatic float_t fp_neg(float_t a);
    return {~a[31], a[30:0]};
  endfunction

  function automatic logic fp_is_zero(float_t a);
    return a[30:23] == 8'd0;
  endfunction

  function automatic logic fp_is_inf(float_t a);
    return (a[30:23] == 8'hFF) && (a[22:0] == 23'd0);
  endfunction

  function automatic logic fp_is_nan(float_t a);
    return (a[30:23] == 8'hFF) && (a[22:0] != 23'd0);
  endfunction

  // Round a significand to 24 bits and pack. sig[26] is the hidden bit,
  // sig[25:3] the fraction, sig[2] guard, sig[1] round, sig[0] sticky.
  // e is the biased exponent of sig[26], and may be out of range.
  function automatic float_t fp_round_pack(logic s, int e, logic [26:0] sig);
    logic [24:0] m;
    logic        up;
    int          ee;
    up = sig[2] & (sig[3] | sig[1] | sig[0]);
    m  = {1'b0, sig[26:3]} + {24'd0, up};
    ee = e;
    if (m[24]) begin
      m  = m >> 1;
      ee = ee + 1;
    end
    if (ee >= 255) return {s, 8'hFF, 23'd0};
    if (ee <= 0)   return {s, 31'd0};
    return {s, ee[7:0], m[22:0]};
  endfunction

  function automatic float_t fp_mul(float_t a, float_t b);
    logic        s;
    int          e;
    logic [47:0] p;
    logic [26:0] sig;
    s = a[31] ^ b[31];
    if (fp_is_nan(a) || fp_is_nan(b) ||
        (fp_is_inf(a) && fp_is_zero(b)) || (fp_is_inf(b) && fp_is_zero(a)))
      return FP_QNAN;
    if (fp_is_inf(a) || fp_is_inf(b)) return {s, 8'hFF, 23'd0};
    if (fp_is_zero(a) || fp_is_zero(b)) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) begin
      sig = {p[47:22], |p[21:0]};
      e   = e + 1;
    end else begin
      sig = {p[46:21], |p[20:0]};
    end
    return fp_round_pack(s, e, sig);
  endfunction

  function automatic float_t fp_add(float_t a, float_t b);
    float_t      x, y;
    int          d, lz, e;
    logic [49:0] yw;
    logic [26:0] xm, ym, diff, sig;
    logic [27:0] sum;
    if (fp_is_nan(a) || fp_is_nan(b)) return FP_QNAN;
    if (fp_is_inf(a) && fp_is_inf(b) && (a[31] != b[31])) return FP_QNAN;
    if (fp_is_inf(a)) return a;
    if (fp_is_inf(b)) return b;
    if (fp_is_zero(a) && fp_is_zero(b)) return {a[31] & b[31], 31'd0};
    if (fp_is_zero(a)) return b;
    if (fp_is_zero(b)) return a;
    // x is the operand of larger magnitude
    if (a[30:0] < b[30:0]) begin
      x = b;
      y = a;
    end else begin
      x = a;
      y = b;
    end
    d  = int'(x[30:23]) - int'(y[30:23]);
    xm = {1'b1, x[22:0], 3'b000};
    yw = {1'b1, y[22:0], 26'd0};
    if (d > 49) yw = 50'd1;
    else        yw = yw >> d;
    ym = {yw[49:24], |yw[23:0]};
    e  = int'(x[30:23]);
    if (x[31] == y[31]) begin
      sum = {1'b0, xm} + {1'b0, ym};
      if (sum[27]) begin
        sig = {sum[27:2], sum[1] | sum[0]};
        e   = e + 1;
      end else begin
        sig = sum[26:0];
      end
    end else begin
      diff = xm - ym;
      if (diff == 27'd0) return FP_ZERO;
      lz = 0;
      for (int k = 26; k >= 0; k--) begin
        if (diff[k]) break;
        lz++;
      end
      sig = diff << lz;
      e   = e - lz;
    end
    return fp_round_pack(x[31], e, sig);
  endfunction

  function automatic float_t fp_sub(float_t a, float_t b);
    return fp_add(a, fp_neg(b));
  endfunction

  function automatic float_t fp_div(float_t a, float_t b);
    logic        s;
    int          e;
    logic [49:0] num, q, rem;
    logic [26:0] sig;
    s = a[31] ^ b[31];
    if (fp_is_nan(a) || fp_is_nan(b) || (fp_is_inf(a) && fp_is_inf(b)) ||
        (fp_is_zero(a) && fp_is_zero(b)))
      return FP_QNAN;
    if (fp_is_inf(a) || fp_is_zero(b)) return {s, 8'hFF, 23'd0};
    if (fp_is_inf(b) || fp_is_zero(a)) return {s, 31'd0};
    num = {1'b1, a[22:0], 26'd0};
    q   = num / {26'd0, 1'b1, b[22:0]};
    rem = num % {26'd0, 1'b1, b[22:0]};
    e   = int'(a[30:23]) - int'(b[30:23]) + 127;
    if (q[26]) begin
      sig = {q[26:1], q[0] | (rem != 50'd0)};
    end else begin
      sig = {q[25:0], rem != 50'd0};
      e   = e - 1;
    end
    return fp_round_pack(s, e, sig);
  endfunction

  // Square root by the digit-by-digit (restoring) method on the integer
  // significand, 26 result bits plus a sticky bit from the remainder.
  function automatic float_t fp_sqrt(float_t a);
    int          ee, half;
    logic [51:0] x;
    logic [53:0] rem, trial;
    logic [25:0] root;
    logic [26:0] sig;
    if (fp_is_nan(a)) return FP_QNAN;
    if (fp_is_zero(a)) return a;
    if (a[31]) return FP_QNAN;
    if (fp_is_inf(a)) return a;
    ee   = int'(a[30:23]) - 127;
    half = ee >>> 1;
    if (ee[0]) x = {1'b1, a[22:0], 28'd0};
    else       x = {1'b0, 1'b1, a[22:0], 27'd0};
    rem  = '0;
    root = '0;
    for (int k = 25; k >= 0; k--) begin
      rem   = {rem[51:0], x[2*k+1], x[2*k]};
      trial = {26'd0, root, 2'b01};
      if (rem >= trial) begin
        rem  = rem - trial;
        root = {root[24:0], 1'b1};
      end else begin
        root = {root[24:0], 1'b0};
      end
    end
    sig = {root, rem != 54'd0};
    return fp_round_pack(1'b0, half + 127, sig);
  endfunction

endpackage
