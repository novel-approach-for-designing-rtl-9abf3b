// rc_pkg: constants and width helpers shared by the reverse converter for the
// four-moduli set {2^n, 2^(2n+1)-1, 2^n+1, 2^n-1}.
//
// The word length n sets every width in the datapath. The converter is built
// for n = 4 by default, the size it is evaluated at; any n >= 2 works.
// Widths, with n the word length:
//   x1  (mod 2^n)         n bits
//   x2  (mod 2^(2n+1)-1)  2n+1 bits
//   x3  (mod 2^n+1)       n+1 bits
//   x4  (mod 2^n-1)       n bits
//   X   (binary result)   5n+1 bits
package rc_pkg;

  // Default word length of the converter.
  localparam int unsigned DEFAULT_N = 4;

  // Width of the binary result: the dynamic range M = 2^n (2^(2n+1)-1)(2^(2n)-1)
  // is below 2^(5n+1).
  function automatic int unsigned result_width(int unsigned n);
    return 5 * n + 1;
  endfunction

  // Width of the HRPX subtractor: the mixed-radix digit Y = (X - x1) / 2^n
  // lies below (2^(2n+1)-1)(2^(2n)-1) < 2^(4n+1).
  function automatic int unsigned hrpx_width(int unsigned n);
    return 4 * n + 1;
  endfunction

endpackage
