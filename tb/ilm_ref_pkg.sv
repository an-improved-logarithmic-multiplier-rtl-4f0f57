// ilm_ref_pkg: arithmetic reference models for the ILM testbenches.
//
// These functions compute the expected results with integer arithmetic on
// the operand values (loops over powers of two, ordinary multiplication and
// addition), not with the bit-level logic of the RTL, so that a testbench
// compares two independent descriptions of the same behaviour.
package ilm_ref_pkg;

  // Nearest power of two of n for a w-bit multiplier: 2^k where 2^k <= n <
  // 2^(k+1), replaced by 2^(k+1) when n - 2^k >= 2^(k+1) - n, and never
  // above 2^(w-1). Returns 0 for n = 0.
  function automatic int ref_nearest_pow2(int n, int w);
    int p;
    if (n <= 0) return 0;
    p = 1;
    while (2 * p <= n) p = 2 * p;
    if (n - p >= 2 * p - n) p = 2 * p;
    if (p > (1 << (w - 1))) p = 1 << (w - 1);
    return p;
  endfunction

  function automatic int ref_log2(int p);
    int k;
    k = 0;
    while ((1 << (k + 1)) <= p) k++;
    return k;
  endfunction

  // ILM product of a and b (w-bit unsigned), with approx_bits low bits of
  // the residue sum replaced by the alternating 1010.. pattern (MSB of the
  // pattern = 1). A negative result is returned as 0; otherwise the result
  // is taken modulo 2^(2w).
  function automatic longint ref_ilm(int a, int b, int w, int approx_bits);
    int p1, p2, k1, k2, q1, q2;
    longint t1, t2, s, modv, hi, pat;
    modv = longint'(1) << (2 * w);
    if (a == 0 || b == 0) return 0;
    p1 = ref_nearest_pow2(a, w);
    p2 = ref_nearest_pow2(b, w);
    k1 = ref_log2(p1);
    k2 = ref_log2(p2);
    q1 = a - p1;
    q2 = b - p2;
    t1 = longint'(q1) * (longint'(1) << k2);
    t2 = longint'(q2) * (longint'(1) << k1);
    if (approx_bits == 0) begin
      s = t1 + t2;
    end else begin
      // floor(t / 2^k) for signed t, via arithmetic shift
      hi = (t1 >>> approx_bits) + (t2 >>> approx_bits);
      pat = 0;
      for (int j = approx_bits - 1; j >= 0; j -= 2) pat += longint'(1) << j;
      s = hi * (longint'(1) << approx_bits) + pat;
    end
    s = s + (longint'(1) << (k1 + k2));
    if (s < 0) return 0;
    return ((s % modv) + modv) % modv;
  endfunction

endpackage
