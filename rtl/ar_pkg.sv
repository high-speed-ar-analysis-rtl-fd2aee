// ar_pkg: types and helper functions shared by the two AR (autoregressive)
// analysis processors.
//
// Rational fraction number system. A value x is held as a pair of 18-bit
// integers, x = n / d: a signed numerator and a denominator that is always
// kept positive. The 18-bit width of both parts follows the document; the
// normalisation rule below is this design's own choice: after each
// operation the wide intermediate numerator and denominator are shifted
// right by the same amount, just enough for the magnitude of both to fit in
// 17 bits, so that the ratio is kept while the low bits are dropped (a
// block-floating-point style renormalisation shared by both parts).
// If the denominator underflows to zero the value saturates to +/-(2^17-1)/1.
package ar_pkg;

  localparam int unsigned RAT_W = 18;            // numerator / denominator width
  localparam int unsigned RAT_MAG = RAT_W - 1;   // magnitude bits kept
  localparam int unsigned WIDE_W = 40;           // width of unnormalised results
  localparam int unsigned SH_W = 6;              // width of a shift amount

  typedef struct packed {
    logic signed [RAT_W-1:0] n;   // numerator, signed
    logic signed [RAT_W-1:0] d;   // denominator, > 0
  } rat_t;

  typedef enum logic {
    RAT_MUL = 1'b0,
    RAT_DIV = 1'b1
  } rat_op_e;

  localparam rat_t RAT_ZERO = '{n: 18'sd0, d: 18'sd1};
  localparam rat_t RAT_ONE  = '{n: 18'sd1, d: 18'sd1};

  // Absolute value of a wide signed quantity.
  function automatic logic [WIDE_W-1:0] wide_abs(input logic signed [WIDE_W-1:0] v);
    return v[WIDE_W-1] ? WIDE_W'(-v) : WIDE_W'(v);
  endfunction

  // Right shift needed so that a magnitude fits in RAT_MAG bits.
  function automatic logic [SH_W-1:0] rat_shift_amt(input logic [WIDE_W-1:0] mag);
    logic [SH_W-1:0] s;
    s = '0;
    for (int b = RAT_MAG; b < WIDE_W; b++) begin
      if (mag[b]) s = SH_W'(b - RAT_MAG + 1);
    end
    return s;
  endfunction

  // Shift a wide numerator / positive denominator pair by s and pack it,
  // saturating when the denominator vanishes.
  function automatic rat_t rat_pack(input logic signed [WIDE_W-1:0] n_w,
                                    input logic signed [WIDE_W-1:0] d_w,
                                    input logic [SH_W-1:0] s);
    logic signed [RAT_W-1:0]  n_s;
    logic signed [WIDE_W-1:0] d_s;
    rat_t r;
    n_s = RAT_W'(n_w >>> s);
    d_s = d_w >>> s;
    if (d_s == 0) begin
      r.n = n_w[WIDE_W-1] ? -RAT_W'(signed'((1 << RAT_MAG) - 1))
                          :  RAT_W'(signed'((1 << RAT_MAG) - 1));
      r.d = RAT_W'(1);
      if (n_w == 0) r.n = '0;
    end else begin
      r.n = RAT_W'(n_s);
      r.d = RAT_W'(d_s);
    end
    return r;
  endfunction

  // Full normalisation of a wide pair (used where timing is not critical).
  function automatic rat_t rat_norm(input logic signed [WIDE_W-1:0] n_w,
                                    input logic signed [WIDE_W-1:0] d_w);
    return rat_pack(n_w, d_w, rat_shift_amt(wide_abs(n_w) | wide_abs(d_w)));
  endfunction

  function automatic rat_t rat_neg(input rat_t x);
    rat_t r;
    r.n = -x.n;
    r.d = x.d;
    return r;
  endfunction

  function automatic int unsigned clog2_min1(input int unsigned v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction

endpackage
