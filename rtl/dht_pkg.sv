// dht_pkg -- constants and elaboration-time helpers shared by the DHT datapath.
//
// Every datapath value is a two's-complement integer whose LSB equals the LSB of the
// input samples. Multiplications by the transform constants use unsigned fixed-point
// constants with CF fractional bits; the products are rounded back to integers.
// The constants are computed at elaboration time from their closed forms:
//   cos_q(m, n, cf) = round(cos(2*pi*m/n) * 2^cf)
//   sqrt2_q(cf)     = round(sqrt(2) * 2^cf)
// The bit widths are this design's choice; the original architecture leaves them open.
package dht_pkg;

  localparam real PI = 3.14159265358979323846;

  // Fixed-point cos(2*pi*m/n), rounded to nearest, cf fractional bits.
  function automatic int unsigned cos_q(int m, int n, int cf);
    real v;
    v = $cos(2.0 * PI * real'(m) / real'(n)) * (2.0 ** cf);
    return int'(v + 0.5);
  endfunction

  // Fixed-point sqrt(2), the only constant of the 8-point kernel.
  function automatic int unsigned sqrt2_q(int cf);
    return int'($sqrt(2.0) * (2.0 ** cf) + 0.5);
  endfunction

  // Internal datapath width for an n-point transform of w_in-bit samples. The auxiliary
  // sequences are alternating sums and grow by up to log2(n/2) bits per recursion level,
  // so the internal values can be far larger than the final coefficients.
  function automatic int int_width(int n, int w_in);
    return w_in + 3 * $clog2(n) + 1;
  endfunction

  // Width of an output coefficient: |X(k)| <= n * sqrt(2) * 2^(w_in-1).
  function automatic int out_width(int n, int w_in);
    return w_in + $clog2(n) + 1;
  endfunction

  // Pipeline depth, in frame periods, of the recursive core for an n-point transform:
  // the 8-point kernel needs none, every doubling adds one register stage.
  function automatic int core_latency(int n);
    return (n <= 8) ? 0 : core_latency(n / 2) + 1;
  endfunction

endpackage
