// dht8 -- 8-point discrete Hartley transform kernel, the leaf of the recursion.
//
//   X(k) = sum_n x(n) * cas(2*pi*n*k/8),  cas = cos + sin.
// Sums and differences of samples four apart are formed first and shared by all
// outputs. The even outputs need only additions; the odd outputs need
// (x0-x4) +/- (x2-x6) plus sqrt(2)*(x1-x5) or sqrt(2)*(x3-x7). Both sqrt(2) products go
// through one time-shared constant multiplier (mul_shared). The factorisation is the
// document's; the operand order in the shared multiplier is this design's choice.
//
// Interface: x[8] held stable for one frame period; X[8] valid in phase P-1 of that
// period (the adders are combinational, the multiplier needs the P phases).
module dht8
  import dht_pkg::*;
#(
  parameter int W  = 32,
  parameter int CF = 24,
  parameter int P  = 4
) (
  input  logic                            clk,
  input  logic [$clog2(P > 1 ? P : 2)-1:0] phase,
  input  logic signed [W-1:0]             x [8],
  output logic signed [W-1:0]             X [8]
);
  logic signed [W-1:0] s04, s26, s15, s37;   // sums of samples four apart
  logic signed [W-1:0] d04, d26, d15, d37;   // differences of samples four apart
  logic signed [W-1:0] a_p, a_m, b_p, b_m, e_p, e_m;
  logic signed [W-1:0] mop  [2];
  logic signed [W-1:0] mres [2];

  always_comb begin
    s04 = x[0] + x[4];  d04 = x[0] - x[4];
    s26 = x[2] + x[6];  d26 = x[2] - x[6];
    s15 = x[1] + x[5];  d15 = x[1] - x[5];
    s37 = x[3] + x[7];  d37 = x[3] - x[7];
    a_p = s04 + s26;    a_m = s04 - s26;
    b_p = s15 + s37;    b_m = s15 - s37;
    e_p = d04 + d26;    e_m = d04 - d26;
  end

  assign mop[0] = d15;
  assign mop[1] = d37;

  mul_shared #(.W(W), .CF(CF), .C(sqrt2_q(CF)), .P(P), .NOPS(2)) u_mul (
    .clk  (clk),
    .phase(phase),
    .op   (mop),
    .prod (mres)
  );

  always_comb begin
    X[0] = a_p + b_p;
    X[4] = a_p - b_p;
    X[2] = a_m + b_m;
    X[6] = a_m - b_m;
    X[1] = e_p + mres[0];
    X[5] = e_p - mres[0];
    X[3] = e_m + mres[1];
    X[7] = e_m - mres[1];
  end

endmodule
