// tb_bcd_ref_pkg: reference arithmetic on packed BCD numbers for the
// testbenches, written independently of the RTL: numbers are unpacked into
// arrays of decimal digits and handled with integer schoolbook arithmetic.
// Numbers of up to 32 digits are held in 128-bit vectors, digit 0 in bits
// [3:0].
package tb_bcd_ref_pkg;

  localparam int MAXD = 32;
  typedef logic [4*MAXD-1:0] bcd_t;

  // Random valid BCD number of n digits.
  function automatic bcd_t rand_bcd(int n);
    bcd_t r = '0;
    for (int i = 0; i < n; i++) r[4*i +: 4] = 4'($urandom_range(9));
    return r;
  endfunction

  // (a + b) mod 10^n.
  function automatic bcd_t add_ref(bcd_t a, bcd_t b, int n);
    bcd_t r = '0;
    int   c = 0;
    for (int i = 0; i < n; i++) begin
      int s = int'(a[4*i +: 4]) + int'(b[4*i +: 4]) + c;
      c = s / 10;
      r[4*i +: 4] = 4'(s % 10);
    end
    return r;
  endfunction

  // (a - b) mod 10^n.
  function automatic bcd_t sub_ref(bcd_t a, bcd_t b, int n);
    bcd_t r = '0;
    int   br = 0;
    for (int i = 0; i < n; i++) begin
      int s = int'(a[4*i +: 4]) - int'(b[4*i +: 4]) - br;
      br = (s < 0) ? 1 : 0;
      r[4*i +: 4] = 4'(s + 10 * br);
    end
    return r;
  endfunction

  // Full product of two n-digit numbers (2n digits).
  function automatic bcd_t mul_ref(bcd_t x, bcd_t y, int n);
    int   col [2*MAXD];
    bcd_t r = '0;
    int   c = 0;
    for (int k = 0; k < 2 * MAXD; k++) col[k] = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        col[i + j] += int'(x[4*j +: 4]) * int'(y[4*i +: 4]);
    for (int k = 0; k < 2 * n; k++) begin
      int s = col[k] + c;
      c = s / 10;
      r[4*k +: 4] = 4'(s % 10);
    end
    return r;
  endfunction

endpackage
