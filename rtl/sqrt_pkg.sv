// sqrt_pkg: constants and constant functions shared by the square root module.
//
// isqrt_int() fills the initial-approximation ROM at elaboration time, so no
// table file is needed. The latency functions give the cycle counts of the
// iterative datapath: one cycle for the look-up table read, then
// iter_cycles() = 5 + BLOCK_BITS cycles per refinement iteration
// (candidate register, two multiplier stages, subtract, one cycle per
// comparison-tree level, root update). With 2-bit blocks that is 7 cycles per
// iteration, the rate implied by the published cycle counts.
package sqrt_pkg;

  // floor(sqrt(v)) for any 32-bit v, computed bit by bit from the MSB.
  function automatic int unsigned isqrt_int(input int unsigned v);
    int unsigned r;
    int unsigned t;
    r = 0;
    for (int b = 15; b >= 0; b--) begin
      t = r | (32'd1 << b);
      if (t * t <= v) r = t;
    end
    return r;
  endfunction

  // Number of refinement iterations for a full-resolution root:
  // the root has IN_WIDTH/2 bits, the ROM gives ROM_BITS/2 of them and every
  // iteration adds BLOCK_BITS more.
  function automatic int num_iters(input int in_width, input int rom_bits,
                                   input int block_bits);
    return (in_width / 2 - rom_bits / 2) / block_bits;
  endfunction

  // Cycles spent in one refinement iteration.
  function automatic int iter_cycles(input int block_bits);
    return 5 + block_bits;
  endfunction

  // Cycles from an accepted start to done when no exact root stops it early.
  function automatic int full_latency(input int in_width, input int rom_bits,
                                      input int block_bits);
    return 1 + num_iters(in_width, rom_bits, block_bits) * iter_cycles(block_bits);
  endfunction

  // State of the sequencing controller.
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,   // waiting for start
    ST_ROM  = 2'd1,   // look-up table read of the radicand's MSBs
    ST_RUN  = 2'd2    // refinement iterations in flight
  } ctrl_state_e;

endpackage
