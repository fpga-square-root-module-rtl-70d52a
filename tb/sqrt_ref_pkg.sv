// sqrt_ref_pkg: reference model for the square root testbenches.
//
// ref_isqrt() is the textbook restoring digit-by-digit square root on
// 128-bit values (shift in two radicand bits, try to subtract 4*root+1),
// which uses no multiplier and no table, so it shares nothing with the
// design under test. ref_iters() gives the number of refinement iterations
// the design should spend on a radicand: all of them, unless the radicand is
// a perfect square whose root has enough trailing zero bits to be complete
// after an earlier iteration.
package sqrt_ref_pkg;

  typedef logic [127:0] u128_t;

  function automatic u128_t ref_isqrt(input u128_t v, input int width);
    u128_t rem, root, trial;
    rem  = '0;
    root = '0;
    for (int i = width / 2 - 1; i >= 0; i--) begin
      rem   = (rem << 2) | ((v >> (2 * i)) & 128'd3);
      trial = (root << 2) | 128'd1;
      root  = root << 1;
      if (rem >= trial) begin
        rem  = rem - trial;
        root = root | 128'd1;
      end
    end
    return root;
  endfunction

  function automatic int ref_iters(input u128_t v, input int width,
                                   input int rom_bits, input int block_bits);
    int    total;
    int    pos;
    u128_t s;
    total = (width / 2 - rom_bits / 2) / block_bits;
    s = ref_isqrt(v, width);
    if (s * s != v) return total;
    for (int i = 1; i <= total; i++) begin
      pos = width / 2 - rom_bits / 2 - block_bits * i;
      if ((s & ((u128_t'(1) << pos) - 1)) == '0) return i;
    end
    return total;
  endfunction

endpackage
