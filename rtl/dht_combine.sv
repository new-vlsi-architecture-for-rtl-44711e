// dht_combine -- combines two N/2-point DHTs into one N-point DHT (ADD/SUB + MUL).
//
// With E = DHT of the even samples, U = DHT of the auxiliary sequence u and u0 = u(0),
// write W(j) = 2*U(j) - u0, S(k) = sin(2*pi*k/N)*u0 and c_k = cos(2*pi*k/N). Then
//   X(k)       = E(k) + S(k) + c_k*W(k)            X(N/2+k) = E(k) - S(k) - c_k*W(k)
//                                                  (k = 0 .. N/4-1)
//   X(N/2-k)   = E(N/2-k) + S(k) - c_k*W(N/2-k)    X(N-k)   = E(N/2-k) - S(k) + c_k*W(N/2-k)
//                                                  (k = 1 .. N/4)
// which are the original algorithm's combining equations with 2*c_k*(U - u0/2) written as c_k*W,
// so no half-LSB is needed. Because sin(2*pi*k/N) = c_(N/4-k), each constant c_m
// (m = 1 .. N/4-1) multiplies three operands: W(m), W(N/2-m) and u0. One mul_shared
// per constant serves all three in time (N/4-1 multipliers in total). c_0 = 1 and
// c_(N/4) = 0 need no multiplier. The pairing of k with N/2-k is the XCH wiring of the
// architecture. Combinational around the shared multipliers.
//
// Interface: E, U, u0 held stable for one frame period; X valid in phase P-1.
module dht_combine
  import dht_pkg::*;
#(
  parameter int N  = 32,
  parameter int W  = 32,
  parameter int CF = 24,
  parameter int P  = 4
) (
  input  logic                            clk,
  input  logic [$clog2(P > 1 ? P : 2)-1:0] phase,
  input  logic signed [W-1:0]             E  [N/2],
  input  logic signed [W-1:0]             U  [N/2],
  input  logic signed [W-1:0]             u0,
  output logic signed [W-1:0]             X  [N]
);
  localparam int Q = N / 4;

  logic signed [W-1:0] Wv [N/2];       // 2*U(j) - u0
  logic signed [W-1:0] p1 [Q+1];       // c_k * W(k)
  logic signed [W-1:0] p2 [Q+1];       // c_k * W(N/2-k)
  logic signed [W-1:0] sk [Q+1];       // sin(2*pi*k/N) * u0

  always_comb begin
    for (int j = 0; j < N / 2; j++) Wv[j] = (U[j] <<< 1) - u0;
  end

  // k = 0: c_0 = 1, sin = 0.  k = N/4: c = 0, sin = 1.
  assign p1[0] = Wv[0];
  assign p2[0] = '0;
  assign sk[0] = '0;
  assign p1[Q] = '0;
  assign p2[Q] = '0;
  assign sk[Q] = u0;

  // MUL block: one shared multiplier per constant c_m.
  for (genvar m = 1; m < Q; m++) begin : g_mul
    logic signed [W-1:0] mop  [3];
    logic signed [W-1:0] mres [3];
    assign mop[0] = Wv[m];
    assign mop[1] = Wv[N/2-m];
    assign mop[2] = u0;
    mul_shared #(.W(W), .CF(CF), .C(cos_q(m, N, CF)), .P(P), .NOPS(3)) u_mul (
      .clk  (clk),
      .phase(phase),
      .op   (mop),
      .prod (mres)
    );
    assign p1[m]   = mres[0];
    assign p2[m]   = mres[1];
    assign sk[Q-m] = mres[2];
  end

  // ADD/SUB butterflies.
  always_comb begin
    logic signed [W-1:0] t, r;
    for (int k = 0; k < Q; k++) begin
      t         = sk[k] + p1[k];
      X[k]      = E[k] + t;
      X[N/2+k]  = E[k] - t;
    end
    for (int k = 1; k <= Q; k++) begin
      r         = sk[k] - p2[k];
      X[N/2-k]  = E[N/2-k] + r;
      X[N-k]    = E[N/2-k] - r;
    end
  end

endmodule
