// aux_seq -- the auxiliary input sequence of the length-doubling DHT step ("U" block).
//
// From the L = N/2 odd-indexed samples xo(i) = x(2i+1) it forms
//   u(L-1) = xo(L-1),   u(i) = xo(i) - u(i+1)   for i = L-2 .. 0,
// so that x(2i+1) = u(i) + u(i+1) with u(L) = 0. This rewriting turns the odd half of
// the transform into a plain DHT of u scaled by 2*cos, which is what lets the combining
// stage share multipliers. The recursion is the original algorithm's; it is built here as the
// plain chain of L-1 subtractors the recursion describes (combinational, no registers).
//
// Interface: xo[L] (signed, W bits) -> u[L] (signed, W bits). The caller sizes W for
// the growth of the alternating sums (up to L times the input magnitude).
module aux_seq #(
  parameter int L = 16,
  parameter int W = 32
) (
  input  logic signed [W-1:0] xo [L],
  output logic signed [W-1:0] u  [L]
);
  always_comb begin
    u[L-1] = xo[L-1];
    for (int i = L - 2; i >= 0; i--) begin
      u[i] = xo[i] - u[i+1];
    end
  end
endmodule
