// mul_shared -- multiplier with a constant, shared by up to P operands in time.
//
// The operands are held stable for a whole frame period of P cycles. Operand j is
// served by multiplier j / P in phase j % P: in that phase the multiplexer feeds it to
// the constant multiplier and the demultiplexer stores the product in slot register j.
// Products of phase P-1 are not registered: they are read directly while phase P-1 is
// active, which is exactly when the downstream pipeline register loads (frame_stb).
// Hence all NOPS products are valid together in phase P-1, and the block costs
// ceil(NOPS / P) multipliers instead of NOPS. With NOPS <= P (the normal case) this
// is one multiplier; with P = 1 the block degenerates to NOPS plain multipliers and
// no registers. Sharing one constant multiplier among four operands through
// multiplexers and demultiplexers follows the original architecture; the slot timing and the
// unregistered last slot are this design's choice.
//
// Interface: op[NOPS] (signed, W bits) stable during the frame, phase from phase_ctrl;
// prod[j] = round(op[j] * C / 2^CF), valid in phase P-1.
module mul_shared #(
  parameter int          W    = 32,
  parameter int          CF   = 24,
  parameter int unsigned C    = 23726566,
  parameter int          P    = 4,
  parameter int          NOPS = 4
) (
  input  logic                            clk,
  input  logic [$clog2(P > 1 ? P : 2)-1:0] phase,
  input  logic signed [W-1:0]             op   [NOPS],
  output logic signed [W-1:0]             prod [NOPS]
);
  localparam int PW   = $clog2(P > 1 ? P : 2);
  localparam int NMUL = (NOPS + P - 1) / P;

  logic signed [W-1:0] mux_out [NMUL];
  logic signed [W-1:0] mul_out [NMUL];
  logic signed [W-1:0] slot    [NOPS];

  initial begin
    assert (NOPS >= 1 && P >= 1)
      else $fatal(1, "mul_shared: NOPS=%0d and P=%0d must be positive", NOPS, P);
  end

  for (genvar m = 0; m < NMUL; m++) begin : g_mul
    // Multiplexer: select the operand of the current phase.
    always_comb begin
      mux_out[m] = '0;
      for (int s = 0; s < P; s++) begin
        if (m * P + s < NOPS && phase == PW'(s)) mux_out[m] = op[m * P + s];
      end
    end

    const_mult #(.W(W), .CF(CF), .C(C)) u_mult (
      .a(mux_out[m]),
      .p(mul_out[m])
    );
  end

  // Demultiplexer: store each product in its slot.
  always_ff @(posedge clk) begin
    for (int j = 0; j < NOPS; j++) begin
      if (phase == PW'(j % P)) slot[j] <= mul_out[j / P];
    end
  end

  always_comb begin
    for (int j = 0; j < NOPS; j++) begin
      prod[j] = (j % P == P - 1) ? mul_out[j / P] : slot[j];
    end
  end

endmodule
