// Reference models for the testbenches of the ARA-based Booth multipliers.
//
// The approximate odd multiples are modelled arithmetically rather than with
// gates. Each is the exact multiple plus the rounding error of every ARA
// bracket, round(x) - x, where round() clamps x to 0..1 and the error is
// weighted by the bracket's bit position. The Booth digits are computed from
// the multiplier bits as integers. All functions work on signed N-bit
// operands held in longint.
package tb_ara_ref_pkg;

  function automatic int clamp01(int v);
    return (v < 0) ? 0 : (v > 1) ? 1 : v;
  endfunction

  // Rounding error of one bracket, round(x) - x, as a longint ready to shift
  function automatic longint rnd_err(int x);
    int e;
    e = clamp01(x) - x;
    return longint'(e);
  endfunction

  function automatic int bit_of(longint v, int i);
    return int'((v >>> i) & 1);   // arithmetic shift: sign extension for free
  endfunction

  // 3A with P two-bit ARAs
  function automatic longint ref_3a(longint a, int p);
    longint r = 3 * a;
    for (int k = 0; k < p; k++) begin
      int i = 2*k + 1;
      int ci = (k == 0) ? 0 : bit_of(a, i-2);
      int x = ci + bit_of(a, i-1) - bit_of(a, i);
      r += rnd_err(x) <<< i;
    end
    return r;
  endfunction

  // 5A with P three-bit ARAs
  function automatic longint ref_5a(longint a, int p);
    longint r = 5 * a;
    for (int k = 0; k < p; k++) begin
      int i = 3*k + 2;
      int ci = (k == 0) ? 0 : bit_of(a, i-3);
      int y = bit_of(a, i+1) + bit_of(a, i-1) - bit_of(a, i);
      int x = bit_of(a, i-2) + ci - bit_of(a, i);
      r += (rnd_err(y) <<< (i+1)) + (rnd_err(x) <<< i);
    end
    return r;
  endfunction

  // 7A with P four-bit ARAs
  function automatic longint ref_7a(longint a, int p);
    longint r = 7 * a;
    int ci = ((a & 7) == 0) ? 1 : 0;
    for (int k = 0; k < p; k++) begin
      int i = 4*k + 3;
      int x3 = (1 - bit_of(a, i+3)) + bit_of(a, i-1) - bit_of(a, i);
      int x2 = (1 - bit_of(a, i+2)) + bit_of(a, i-2) - bit_of(a, i-1);
      int x1 = (1 - bit_of(a, i+1)) + bit_of(a, i-3) - bit_of(a, i-2);
      int x0 = ci + (1 - bit_of(a, i)) - bit_of(a, i-3);
      r += (rnd_err(x3) <<< (i+3)) + (rnd_err(x2) <<< (i+2))
         + (rnd_err(x1) <<< (i+1)) + (rnd_err(x0) <<< i);
      ci = bit_of(a, i);
    end
    return r;
  endfunction

  // Booth digit k of b in radix 2^r: the bits b_{rk+r-1} .. b_{rk-1}, with b_{-1} = 0
  function automatic int booth_digit(longint b, int r, int k);
    int d = (k == 0) ? 0 : bit_of(b, r*k - 1);
    for (int j = 0; j < r - 1; j++) d += bit_of(b, r*k + j) << j;
    d -= bit_of(b, r*k + r - 1) << (r - 1);
    return d;
  endfunction

  // Approximate multiple |d|*A used by the multipliers
  function automatic longint ref_multiple(longint a, int m, int p3, int p5, int p7);
    case (m)
      3:       return ref_3a(a, p3);
      5:       return ref_5a(a, p5);
      6:       return 2 * ref_3a(a, p3);
      7:       return ref_7a(a, p7);
      default: return m * a;
    endcase
  endfunction

  // Approximate product of an n-bit radix-2^r Booth multiplier, as a full longint
  function automatic longint ref_product(longint a, longint b, int n, int r,
                                         int p3, int p5, int p7);
    longint acc = 0;
    int nd = (n + r - 1) / r;
    for (int k = 0; k < nd; k++) begin
      int d = booth_digit(b, r, k);
      longint m = ref_multiple(a, (d < 0) ? -d : d, p3, p5, p7);
      acc += ((d < 0) ? -m : m) <<< (r*k);
    end
    return acc;
  endfunction

endpackage
