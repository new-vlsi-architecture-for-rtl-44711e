// dht_core -- recursive, pipelined N-point discrete Hartley transform.
//
// For N = 8 it is the dht8 kernel. For larger N it applies the length-doubling step:
// the odd samples are rewritten into the auxiliary sequence u (aux_seq), two
// N/2-point cores transform the even samples and u in parallel, a pipeline register
// captures both half-length spectra together with u(0), and dht_combine forms the
// N-point spectrum. A 32-point transform is thus 4 dht8 kernels, 2 + 1 combining
// stages, and 3 + 2 + 2 auxiliary chains, all working at the same time. The recursion
// follows the original architecture; placing one register per recursion level is this design's
// choice (the original architecture only notes the structure "can be pipelined").
//
// Timing: x must be stable for one frame period (P cycles). X belongs to that input
// core_latency(N) frame periods later and is valid in its phase P-1 (frame_stb).
// A new input can be applied every frame period.
// The 8-point leaf has no register and leaves frame_stb unused. Linting this module
// on its own, as a top, makes Verilator report the half-length spectra as undriven;
// they are driven by the recursive instances, and the report does not appear when the
// module is linted or simulated inside dht_top or a testbench.
module dht_core
  import dht_pkg::*;
#(
  parameter int N  = 32,
  parameter int W  = 32,
  parameter int CF = 24,
  parameter int P  = 4
) (
  input  logic                            clk,
  input  logic [$clog2(P > 1 ? P : 2)-1:0] phase,
  input  logic                            frame_stb,
  input  logic signed [W-1:0]             x [N],
  output logic signed [W-1:0]             X [N]
);
  if (N == 8) begin : g_leaf
    dht8 #(.W(W), .CF(CF), .P(P)) u_dht8 (
      .clk  (clk),
      .phase(phase),
      .x    (x),
      .X    (X)
    );
  end else begin : g_split
    localparam int H    = N / 2;
    localparam int LSUB = core_latency(H);

    logic signed [W-1:0] xe [H];            // even samples x(2i)
    logic signed [W-1:0] xo [H];            // odd samples x(2i+1)
    logic signed [W-1:0] u  [H];            // auxiliary sequence
    logic signed [W-1:0] e_spec [H];        // DHT of even samples
    logic signed [W-1:0] u_spec [H];        // DHT of u
    logic signed [W-1:0] e_q [H];           // pipeline register
    logic signed [W-1:0] u_q [H];
    logic signed [W-1:0] u0_pipe [LSUB+1];  // u(0) delayed to meet the half spectra

    always_comb begin
      for (int i = 0; i < H; i++) begin
        xe[i] = x[2*i];
        xo[i] = x[2*i+1];
      end
    end

    aux_seq #(.L(H), .W(W)) u_aux (
      .xo(xo),
      .u (u)
    );

    dht_core #(.N(H), .W(W), .CF(CF), .P(P)) u_even (
      .clk(clk), .phase(phase), .frame_stb(frame_stb), .x(xe), .X(e_spec)
    );

    dht_core #(.N(H), .W(W), .CF(CF), .P(P)) u_odd (
      .clk(clk), .phase(phase), .frame_stb(frame_stb), .x(u), .X(u_spec)
    );

    always_ff @(posedge clk) begin
      if (frame_stb) begin
        e_q        <= e_spec;
        u_q        <= u_spec;
        u0_pipe[0] <= u[0];
        for (int s = 1; s <= LSUB; s++) u0_pipe[s] <= u0_pipe[s-1];
      end
    end

    dht_combine #(.N(N), .W(W), .CF(CF), .P(P)) u_comb (
      .clk  (clk),
      .phase(phase),
      .E    (e_q),
      .U    (u_q),
      .u0   (u0_pipe[LSUB]),
      .X    (X)
    );
  end

endmodule
