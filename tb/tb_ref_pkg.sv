// tb_ref_pkg: reference arithmetic for the testbenches, written
// independently of the RTL (integer arithmetic instead of bit-level carries).
//  * csd_digit: non-adjacent form by repeated halving: an odd remainder
//    n takes digit 2 - (n mod 4), i.e. +1 or -1, an even one digit 0.
//  * sce_digit: balanced radix-2**k digits: remainder above 2**(k-1) becomes
//    negative; the top digit takes whatever is left.
//  * mac_ref: the value a MAC returns for given activations and weights,
//    including skipped conversions (i + 2b <= thresh) and ADC clipping.
package tb_ref_pkg;

  function automatic int csd_digit(int a, int pos);
    int n, d;
    n = a;
    d = 0;
    for (int i = 0; i <= pos; i++) begin
      if (n % 2 != 0) begin
        d = 2 - (((n % 4) + 4) % 4);
        n = (n - d) / 2;
      end else begin
        d = 0;
        n = n / 2;
      end
    end
    return d;
  endfunction

  function automatic int sce_digit(int w, int j, int k, int cells);
    int n, d, r;
    n = w;
    d = 0;
    for (int i = 0; i <= j; i++) begin
      if (i == cells - 1) begin
        d = n;
      end else begin
        r = ((n % (1 << k)) + (1 << k)) % (1 << k);
        d = (r > (1 << (k - 1))) ? r - (1 << k) : r;
        n = (n - d) / (1 << k);
      end
    end
    return d;
  endfunction

  function automatic int clip(int v, int bits);
    int hi, lo;
    hi = (1 << (bits - 1)) - 1;
    lo = -(1 << (bits - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  // act[r], w[r] for one weight column; returns the MAC's quantized result
  function automatic longint mac_ref(int act[], int w[], int rows, int iters,
                                     int k, int cells, int adc_bits, int thresh);
    longint acc;
    int bl;
    int z;
    // z is 0 but not a compile-time constant, so simulators keep the loops
    // as loops instead of unrolling the whole reference computation
    z = (act.size() >= 0) ? 0 : 1;
    acc = 0;
    for (int i = z; i < iters + z; i++)
      for (int b = z; b < cells + z; b++) begin
        if (i + 2 * b <= thresh) continue;
        bl = 0;
        for (int r = z; r < rows + z; r++)
          bl += csd_digit(act[r], i) * sce_digit(w[r], b, k, cells);
        acc += longint'(clip(bl, adc_bits)) <<< (i + k * b);
      end
    return acc;
  endfunction

endpackage
