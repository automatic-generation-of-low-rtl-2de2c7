// poly_ref_pkg: reference models used by the testbenches.
//
// Bit-exact models of the two operators written with plain 64-bit integer
// arithmetic (floor division stands for truncation), and the real-valued
// target functions used to bound the total error.
package poly_ref_pkg;

  // floor(a / 2^s) for signed a
  function automatic longint floor_shr(longint a, int s);
    longint d = longint'(1) << s;
    longint q = a / d;
    if ((a % d) != 0 && a < 0) q = q - 1;
    return q;
  endfunction

  // Stored 2^x coefficients as integers over 2^14: 8191/8192, 2853/4096,
  // 1837/8192, 649/8192.
  function automatic longint exp2_coef(int i);
    case (i)
      0: return 8191 * 2;
      1: return 2853 * 4;
      2: return 1837 * 2;
      default: return 649 * 2;
    endcase
  endfunction

  // Horner with every product truncated to 16 fractional bits; x over 2^16.
  // p2_override, when non-zero, replaces p2 (for the alternative solution
  // with p2 = 919/4096).
  function automatic longint exp2_model(longint x, longint p2_override = 0);
    longint acc = exp2_coef(3) * 4;
    for (int i = 2; i >= 0; i--) begin
      longint c = (i == 2 && p2_override != 0) ? p2_override : exp2_coef(i);
      acc = floor_shr(acc * x, 16) + c * 4;
    end
    return acc;
  endfunction

  // sqrt(1+x) operator: x over 2^13, each shifted term truncated.
  function automatic longint sqrt_model(longint x);
    longint sq = (x * x) / 8192;
    return 8192 + (x / 2 - x / 64) - (sq / 16 + sq / 128);
  endfunction

endpackage
