// tb_mul_shared -- checks the time-shared multiplier with a constant.
//
// The testbench runs its own phase counter (P = 4). Operands change at frame
// boundaries and stay stable for P cycles; in phase P-1 every product slot must equal
// round(op * C / 2^CF). One instance uses all four slots, one uses three, one has six
// operands (two multipliers). A fourth instance has P = 1 (no sharing): its products
// must be right in every cycle.
module tb_mul_shared;
  localparam int          W  = 32;
  localparam int          CF = 16;
  localparam int          P  = 4;
  localparam int unsigned C  = 60547;   // round(cos(2*pi*2/32) * 2^16)

  logic clk = 0;
  logic [1:0] phase = 0;
  logic signed [W-1:0] op4 [4], pr4 [4];
  logic signed [W-1:0] op3 [3], pr3 [3];
  logic signed [W-1:0] op6 [6], pr6 [6];
  logic signed [W-1:0] op1 [3], pr1 [3];
  logic                ph1 = 1'b0;
  int checks = 0, failures = 0;

  mul_shared #(.W(W), .CF(CF), .C(C), .P(P), .NOPS(4)) dut4 (
    .clk(clk), .phase(phase), .op(op4), .prod(pr4));
  mul_shared #(.W(W), .CF(CF), .C(C), .P(P), .NOPS(3)) dut3 (
    .clk(clk), .phase(phase), .op(op3), .prod(pr3));

  mul_shared #(.W(W), .CF(CF), .C(C), .P(P), .NOPS(6)) dut6 (
    .clk(clk), .phase(phase), .op(op6), .prod(pr6));
  mul_shared #(.W(W), .CF(CF), .C(C), .P(1), .NOPS(3)) dut1 (
    .clk(clk), .phase(ph1), .op(op1), .prod(pr1));

  always #5 clk = ~clk;

  function automatic longint ref_mul(longint v);
    return (v * longint'(C) + (64'sd1 <<< (CF - 1))) >>> CF;
  endfunction

  task automatic new_ops();
    for (int j = 0; j < 4; j++) op4[j] = $signed($urandom) >>> 8;
    for (int j = 0; j < 3; j++) op3[j] = $signed($urandom) >>> 8;
    for (int j = 0; j < 6; j++) op6[j] = $signed($urandom) >>> 8;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    new_ops();
    for (int f = 0; f < 100; f++) begin
      for (int ph = 0; ph < P; ph++) begin
        phase = 2'(ph);
        if (ph == P - 1) begin
          #1;
          for (int j = 0; j < 4; j++) begin
            checks++;
            if (longint'(pr4[j]) != ref_mul(longint'(op4[j]))) begin
              failures++;
              $display("FAIL f=%0d slot4 %0d got %0d exp %0d", f, j, pr4[j], ref_mul(longint'(op4[j])));
            end
          end
          for (int j = 0; j < 3; j++) begin
            checks++;
            if (longint'(pr3[j]) != ref_mul(longint'(op3[j]))) begin
              failures++;
              $display("FAIL f=%0d slot3 %0d got %0d exp %0d", f, j, pr3[j], ref_mul(longint'(op3[j])));
            end
          end
          for (int j = 0; j < 6; j++) begin
            checks++;
            if (longint'(pr6[j]) != ref_mul(longint'(op6[j]))) begin
              failures++;
              $display("FAIL f=%0d slot6 %0d got %0d exp %0d", f, j, pr6[j], ref_mul(longint'(op6[j])));
            end
          end
        end
        // P = 1: new operands every cycle, products combinational.
        for (int j = 0; j < 3; j++) op1[j] = $signed($urandom) >>> 8;
        #1;
        for (int j = 0; j < 3; j++) begin
          checks++;
          if (longint'(pr1[j]) != ref_mul(longint'(op1[j]))) begin
            failures++;
            $display("FAIL f=%0d P=1 slot %0d got %0d exp %0d", f, j, pr1[j], ref_mul(longint'(op1[j])));
          end
        end
        @(posedge clk);
        #1;
      end
      new_ops();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
