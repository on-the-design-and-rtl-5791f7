// tb_ref_pkg: reference arithmetic for the testbenches, written with plain
// integer multiplication and 64-bit sums so that it shares nothing with the
// shift-and-add structure under test.
package tb_ref_pkg;

  // round half up by sh bits, then clamp to a signed 16-bit sample
  function automatic longint ref_round_sat(longint v, int sh);
    longint r;
    r = (sh > 0) ? ((v + (64'sd1 <<< (sh - 1))) >>> sh) : v;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  function automatic int rand_sample(int amp);
    return int'($urandom_range(2 * amp, 0)) - amp;
  endfunction

endpackage
