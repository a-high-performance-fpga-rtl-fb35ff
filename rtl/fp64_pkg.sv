// fp64_pkg: IEEE 754 binary64 arithmetic used by the PE's multiply-accumulate
// unit. Two pure functions, fp64_mul_f and fp64_add_f, compute one rounded
// result each (round to nearest, ties to even). The pipelined modules fp64_mul
// and fp64_add wrap them and add the pipeline registers.
//
// Simplifications (design choices, not from the source description, which
// only states that the MAC works on 64-bit floating-point operands):
//   * subnormal inputs are read as zero and subnormal results are flushed to
//     a signed zero (flush-to-zero), as is usual for FPGA floating point;
//   * any NaN input gives the canonical quiet NaN 0x7FF8_0000_0000_0000;
//   * exception flags are not produced.
package fp64_pkg;

  typedef logic [63:0] fp64_t;

  localparam fp64_t FP64_QNAN = 64'h7FF8_0000_0000_0000;
  localparam fp64_t FP64_ZERO = 64'h0;

  function automatic logic is_nan(input fp64_t x);
    return (x[62:52] == 11'h7FF) && (x[51:0] != '0);
  endfunction

  function automatic logic is_inf(input fp64_t x);
    return (x[62:52] == 11'h7FF) && (x[51:0] == '0);
  endfunction

  // Exponent zero (zero or subnormal) is read as zero.
  function automatic logic is_zero_ftz(input fp64_t x);
    return x[62:52] == 11'h000;
  endfunction

  // Round a normalised 53-bit significand with guard and sticky bits
  // and pack it. exp_in is the biased exponent, possibly out of range.
  function automatic fp64_t round_pack(input logic sign, input logic signed [13:0] exp_in,
                                       input logic [52:0] sig, input logic guard,
                                       input logic sticky);
    logic [53:0] rsig;
    logic signed [13:0] e;
    logic up;
    up   = guard & (sticky | sig[0]);
    rsig = {1'b0, sig} + 54'(up);
    e    = exp_in;
    if (rsig[53]) begin
      rsig = rsig >> 1;
      e    = e + 14'sd1;
    end
    if (e >= 14'sd2047) return {sign, 11'h7FF, 52'h0};
    if (e <= 14'sd0) return {sign, 63'h0};
    return {sign, e[10:0], rsig[51:0]};
  endfunction

  function automatic fp64_t fp64_mul_f(input fp64_t a, input fp64_t b);
    logic sign;
    logic [52:0] ma, mb;
    logic [105:0] p;
    logic signed [13:0] e;
    logic [52:0] sig;
    logic guard, sticky;
    sign = a[63] ^ b[63];
    if (is_nan(a) || is_nan(b)) return FP64_QNAN;
    if (is_inf(a) || is_inf(b)) begin
      if (is_zero_ftz(a) || is_zero_ftz(b)) return FP64_QNAN;
      return {sign, 11'h7FF, 52'h0};
    end
    if (is_zero_ftz(a) || is_zero_ftz(b)) return {sign, 63'h0};
    ma = {1'b1, a[51:0]};
    mb = {1'b1, b[51:0]};
    p  = ma * mb;
    e  = 14'($unsigned(a[62:52])) + 14'($unsigned(b[62:52])) - 14'sd1023;
    if (p[105]) begin
      sig    = p[105:53];
      guard  = p[52];
      sticky = |p[51:0];
      e      = e + 14'sd1;
    end else begin
      sig    = p[104:52];
      guard  = p[51];
      sticky = |p[50:0];
    end
    return round_pack(sign, e, sig, guard, sticky);
  endfunction

  function automatic fp64_t fp64_add_f(input fp64_t a, input fp64_t b);
    fp64_t larger, lesser;
    logic [10:0] eb, es;
    logic [11:0] d;
    logic [55:0] mb, ms, shifted;     // 53-bit significand + guard, round, sticky
    logic [56:0] s;
    logic sticky_sh;
    logic signed [13:0] e;
    logic [5:0] lz;
    logic za, zb;
    if (is_nan(a) || is_nan(b)) return FP64_QNAN;
    if (is_inf(a) && is_inf(b)) return (a[63] == b[63]) ? a : FP64_QNAN;
    if (is_inf(a)) return a;
    if (is_inf(b)) return b;
    za = is_zero_ftz(a);
    zb = is_zero_ftz(b);
    if (za && zb) return {a[63] & b[63], 63'h0};
    if (za) return b;
    if (zb) return a;
    if (a[62:0] >= b[62:0]) begin larger = a; lesser = b; end
    else begin larger = b; lesser = a; end
    eb = larger[62:52];
    es = lesser[62:52];
    d  = {1'b0, eb} - {1'b0, es};
    mb = {1'b1, larger[51:0], 3'b000};
    ms = {1'b1, lesser[51:0], 3'b000};
    if (d >= 12'd56) begin
      shifted   = '0;
      sticky_sh = 1'b1;
    end else begin
      shifted   = ms >> d;
      sticky_sh = |(ms & ((56'd1 << d) - 56'd1));
    end
    shifted[0] = shifted[0] | sticky_sh;
    e = 14'($unsigned(eb));
    if (larger[63] == lesser[63]) begin
      s = {1'b0, mb} + {1'b0, shifted};
      if (s[56]) begin
        s = {1'b0, s[56:2], s[1] | s[0]};
        e = e + 14'sd1;
      end
    end else begin
      s = {1'b0, mb} - {1'b0, shifted};
      if (s == '0) return FP64_ZERO;
      // leading-zero count: the highest set bit wins
      lz = '0;
      for (int i = 0; i < 56; i++) if (s[i]) lz = 6'(55 - i);
      s = s << lz;
      e = e - 14'(lz);
    end
    return round_pack(larger[63], e, s[55:3], s[2], s[1] | s[0]);
  endfunction

endpackage
