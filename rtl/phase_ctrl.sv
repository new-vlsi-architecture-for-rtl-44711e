// phase_ctrl -- timing for the time-shared constant multipliers.
//
// Each shared multiplier serves P operands, one per clock cycle. This block counts the
// multiplexer phase 0..P-1 and raises frame_stb during the last phase. The frame period
// (P cycles) is the slow clock of the architecture: every pipeline register in the
// transform loads on frame_stb, and the multiplexers step through their operands on
// the fast clock in between. The original architecture says only that the multiplexers and
// demultiplexers are "controlled by two clocks"; deriving the slow clock as a
// clock enable from a single clock is this design's choice.
//
// Interface: clk, rst_n (active-low, synchronous); phase (current operand slot);
// frame_stb (high in phase P-1, one cycle in every P).
module phase_ctrl #(
  parameter int P = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  output logic [$clog2(P > 1 ? P : 2)-1:0] phase,
  output logic                         frame_stb
);
  localparam int PW = $clog2(P > 1 ? P : 2);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0;
    end else if (phase == PW'(P - 1)) begin
      phase <= '0;
    end else begin
      phase <= phase + 1'b1;
    end
  end

  assign frame_stb = (phase == PW'(P - 1));

  // The strobe is followed by phase 0, i.e. the counter wraps exactly at P-1.
  a_wrap: assert property (@(posedge clk) disable iff (!rst_n)
    frame_stb |=> (phase == '0))
    else $error("phase did not wrap after the frame strobe");

endmodule
