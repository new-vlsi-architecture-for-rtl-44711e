// dht_top -- 32-point parallel discrete Hartley transform engine.
//
// A frame of N real samples is taken in parallel, transformed by the recursive
// dht_core (even/odd split with an auxiliary sequence, 8-point kernels, combining
// stages whose multipliers by a constant are each shared by several operands) and the
// N Hartley coefficients are delivered in parallel.
//   X(k) = sum_n x(n) * (cos(2*pi*n*k/N) + sin(2*pi*n*k/N))
// Samples are signed integers of W_IN bits; coefficients are signed integers of
// out_width(N, W_IN) bits, each within a few LSB of the exact transform (products by
// irrational constants are rounded to CF fractional bits). Internally the samples
// carry GB extra fractional guard bits, so that the rounding of the products, which
// the combining stages amplify, stays below one output LSB; the result is rounded
// back to integers at the output register.
//
// Timing: the multiplexers of the shared multipliers step through P phases on clk; a
// frame period of P cycles is the slow clock. in_ready is high one cycle per frame
// period; a frame is taken when in_valid and in_ready are both high. Its coefficients
// appear on X (held for one frame period) with a one-cycle out_valid pulse
// (core_latency(N) + 1) * P cycles later (12 cycles at the defaults). Throughput: N
// samples per frame period. P = 1 removes the sharing (one multiplier per product) and
// takes a new frame in every clock cycle.
// N = 32 and the sharing of each multiplier by four operands follow the original architecture; the
// sample width, constant precision, handshake and reset are this design's choice.
// rst_n is active-low and synchronous; it clears the phase counter and the valid flags.
module dht_top
  import dht_pkg::*;
#(
  parameter int N    = 32,
  parameter int W_IN = 16,
  parameter int CF   = 24,
  parameter int P    = 4,
  parameter int GB   = 4
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  in_valid,
  output logic                                  in_ready,
  input  logic signed [W_IN-1:0]                x [N],
  output logic                                  out_valid,
  output logic signed [out_width(N, W_IN)-1:0]  X [N]
);
  localparam int WD  = int_width(N, W_IN) + GB;
  localparam int WO  = out_width(N, W_IN);
  localparam int LAT = core_latency(N);
  localparam int PW  = $clog2(P > 1 ? P : 2);

  logic [PW-1:0]       phase;
  logic                frame_stb;
  logic signed [WD-1:0] x_q    [N];
  logic signed [WD-1:0] spec   [N];
  logic [LAT:0]        vpipe;

  phase_ctrl #(.P(P)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .phase    (phase),
    .frame_stb(frame_stb)
  );

  assign in_ready = frame_stb;

  // Input register: holds the frame for a whole frame period.
  always_ff @(posedge clk) begin
    if (frame_stb) begin
      for (int i = 0; i < N; i++) x_q[i] <= WD'(x[i]) <<< GB;
    end
  end

  dht_core #(.N(N), .W(WD), .CF(CF), .P(P)) u_core (
    .clk      (clk),
    .phase    (phase),
    .frame_stb(frame_stb),
    .x        (x_q),
    .X        (spec)
  );

  // Output register and valid tracking, both stepped by the frame strobe.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vpipe     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= frame_stb & vpipe[LAT];
      if (frame_stb) begin
        vpipe <= (LAT+1)'({vpipe, in_valid});
      end
    end
  end

  // Drop the guard bits, rounding to nearest.
  logic signed [WD-1:0] spec_rnd [N];
  always_comb begin
    for (int k = 0; k < N; k++) begin
      spec_rnd[k] = (spec[k] + ((GB > 0) ? (WD'(1) <<< (GB - 1)) : '0)) >>> GB;
    end
  end

  always_ff @(posedge clk) begin
    if (frame_stb) begin
      for (int k = 0; k < N; k++) X[k] <= WO'(spec_rnd[k]);
    end
  end

  // Handshake rules: a spectrum is announced only right after a frame strobe, and
  // with sharing (P > 1) a frame slot is offered for a single cycle.
  a_out_after_strobe: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> $past(frame_stb))
    else $error("out_valid outside the cycle after a frame strobe");

  if (P > 1) begin : g_ready_rule
    a_ready_one_cycle: assert property (@(posedge clk) disable iff (!rst_n)
      in_ready |=> !in_ready)
      else $error("in_ready held for more than one cycle");
  end

endmodule
