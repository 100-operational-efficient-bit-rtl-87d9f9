// bsfir_pkg: constants and helper functions shared by the bit-serial FIR filter.
//
// out_width() gives the full-precision width of the filter output and of every
// intermediate sum: w + m + ceil(log2 k) bits (w = data width, m = coefficient
// width, k = number of taps), the extra bits absorbing accumulation growth.
//
// sign_bias() gives the constant that makes the unsigned carry-save arrays of
// the multiply-accumulate units compute two's complement products (this
// design's own way of doing the sign handling, see sp_multiplier). Each
// multiplier array, with its sign-bit partial products inverted, returns
// x*h - C where
//     C = 2^(m-1) + 2^(w-1) - 2^(w+m-1)
// so a chain of k units is short by k*C. sign_bias() returns k*C modulo
// 2^out_width, which the filter feeds into the first unit of the chain.
package bsfir_pkg;

  function automatic int unsigned out_width(int unsigned w, int unsigned m, int unsigned k);
    return w + m + $clog2(k);
  endfunction

  function automatic logic [63:0] sign_bias(int unsigned w, int unsigned m, int unsigned k);
    logic [63:0] c;
    logic [63:0] mask;
    c    = (64'd1 << (m - 1)) + (64'd1 << (w - 1)) - (64'd1 << (w + m - 1));
    mask = (64'd1 << out_width(w, m, k)) - 64'd1;
    return (c * 64'(k)) & mask;
  endfunction

endpackage
