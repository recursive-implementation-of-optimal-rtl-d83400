// mult_pkg: constants and constant functions shared by the multipliers.
//
// mul3m_latency(n) gives the latency in clock cycles of a pipelined mul3m of
// operand width n. Each recursion level registers its input sums and its
// combining-adder output (two cycles); the level's middle sub-multiplier,
// of width ceil(n/2)+1, is the slowest, and the recursion stops at n <= 3
// with no register. mult2m_latency(n) gives the latency of a pipelined 2M
// multiplier with n-bit X: one cycle per csa4 level, log2(n/2).
package mult_pkg;
  function automatic int unsigned mul3m_latency(input int unsigned n);
    int unsigned lat = 0;
    int unsigned w   = n;
    while (w > 3) begin
      lat = lat + 2;
      w   = w - w / 2 + 1;
    end
    return lat;
  endfunction

  function automatic int unsigned mult2m_latency(input int unsigned n);
    return $clog2(n / 2);
  endfunction
endpackage
