// Arithmetic reference models for the fixed-width Booth multiplier tests.
//
// Works from the multiplication's arithmetic, not from the array:
// row i of a radix-4 Booth product is V_i = d_i*A (one's complement,
// -|d_i|*A - 1, for a negative digit) at weight 2^(2i). Keeping only the
// columns of weight >= 2^n of a two's-complement row is floor(V_i*2^(2i)/2^n),
// so
//   direct truncation : T = sum_i floor(V_i*2^(2i) / 2^n)
//   compensated       : T + theta - [theta == n/2]
// where theta counts the bits of weight 2^(n-1) of the rows. Both are
// returned as signed n-bit values (the product divided by 2^n).
package fwb_ref_pkg;

  function automatic longint sext(longint v, int n);
    longint m;
    m = v & ((longint'(1) << n) - 1);
    if (m[n-1]) m -= (longint'(1) << n);
    return m;
  endfunction

  // digit d_i of the radix-4 recoding of b (n bits, two's complement)
  function automatic int booth_digit(longint b, int i);
    int bm1, b0, b1;
    bm1 = (i == 0) ? 0 : int'((b >> (2*i-1)) & 1);
    b0  = int'((b >> (2*i)) & 1);
    b1  = int'((b >> (2*i+1)) & 1);
    return bm1 + b0 - 2*b1;
  endfunction

  // returns the fixed-width product; theta_o reports the main-column count
  function automatic longint ref_fw(longint a, longint b, int n, bit comp,
                                    output int theta_o);
    longint acc, v, w;
    int d, th;
    bit all1;
    acc  = 0;
    th   = 0;
    all1 = 1'b1;
    for (int i = 0; i < n/2; i++) begin
      d = booth_digit(b, i);
      if (d < 0) v = -(longint'(d) * -a) - 64'sd1;
      else       v = longint'(d) * a;
      w = v <<< (2*i);
      acc += w >>> n;
      if (((w >>> (n-1)) & 1) != 0) th++;
      else all1 = 1'b0;
    end
    theta_o = th;
    if (comp) acc += longint'(th) - longint'(all1);
    return sext(acc, n);
  endfunction

endpackage : fwb_ref_pkg
