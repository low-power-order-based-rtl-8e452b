// tb_dct_ref_pkg: reference model shared by the testbenches.
//
// cos_coeff(x, c) is the scaled N-point DCT-II matrix entry
//   round(512 * a(x) * cos((2c + 1) x pi / (2N))), a(0) = sqrt(1/N),
//   a(x > 0) = sqrt(2/N),
// computed here with real arithmetic, independently of the ROM images.
// hamming9 counts differing bits of two 9-bit two's-complement values.
package tb_dct_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic int cos_coeff(int x, int c, int n);
    real a, v;
    a = (x == 0) ? $sqrt(1.0 / n) : $sqrt(2.0 / n);
    v = 512.0 * a * $cos((2.0 * c + 1.0) * x * PI / (2.0 * n));
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  function automatic int hamming9(int a, int b);
    logic [8:0] d;
    d = 9'(a) ^ 9'(b);
    return $countones(d);
  endfunction

endpackage
