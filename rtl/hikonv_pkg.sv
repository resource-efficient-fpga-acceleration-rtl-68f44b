// hikonv_pkg: design-time arithmetic of HiKonv, which packs several
// low-bitwidth convolution operands into one wide multiplier.
//
// For a BIT_A x BIT_B multiplier and p-bit features / q-bit weights, the
// numbers of features N and weights K packed per operand are found by the
// exhaustive search of the HiKonv throughput analysis: maximise the
// equivalent operation count N*K + (N-1)(K-1) subject to
//   p + (N-1)*S <= BIT_A,  q + (K-1)*S <= BIT_B,
//   S = p + q + ceil(log2(min(N,K)))   (slice width with guard bits).
// For the 27x18 DSP with 4-bit operands this gives N = 3, K = 2, S = 9
// (6 multiplications and 2 additions per multiply).
package hikonv_pkg;

  function automatic int unsigned clog2_i(int unsigned x);
    int unsigned r = 0;
    while ((1 << r) < x) r++;
    return r;
  endfunction

  function automatic int unsigned slice_w(int unsigned p, int unsigned q,
                                          int unsigned n, int unsigned k);
    return p + q + clog2_i((n < k) ? n : k);
  endfunction

  // Returns {N, K} packed as N*256 + K.
  function automatic int unsigned best_nk(int unsigned bit_a, int unsigned bit_b,
                                          int unsigned p, int unsigned q);
    int unsigned max_n, max_k, best, opt_n, opt_k, s, ops;
    max_n = (bit_a - p) / (p + q) + 1;
    max_k = (bit_b - q) / (p + q) + 1;
    best = 0; opt_n = 1; opt_k = 1;
    for (int unsigned k = 1; k <= max_k; k++) begin
      for (int unsigned n = 1; n <= max_n; n++) begin
        s   = slice_w(p, q, n, k);
        ops = n * k + (n - 1) * (k - 1);
        if (p + (n - 1) * s <= bit_a && q + (k - 1) * s <= bit_b && ops > best) begin
          best = ops; opt_n = n; opt_k = k;
        end
      end
    end
    return opt_n * 256 + opt_k;
  endfunction

endpackage
