// tb_const_mult -- checks the carry-save constant multiplier against integer arithmetic.
//
// Two instances (sqrt(2) and cos(pi/16) in 16 fractional bits) get random and corner
// operands; the expected result is (a*C + 2^(CF-1)) >> CF computed in 64-bit integers.
module tb_const_mult;
  localparam int          W   = 32;
  localparam int          CF  = 16;
  localparam int unsigned C0  = 92682;   // round(sqrt(2) * 2^16)
  localparam int unsigned C1  = 64277;   // round(cos(2*pi/32) * 2^16)

  logic signed [W-1:0] a, p0, p1;
  int checks = 0, failures = 0;

  const_mult #(.W(W), .CF(CF), .C(C0)) dut0 (.a(a), .p(p0));
  const_mult #(.W(W), .CF(CF), .C(C1)) dut1 (.a(a), .p(p1));

  function automatic longint ref_mul(longint v, longint c);
    return (v * c + (64'sd1 <<< (CF - 1))) >>> CF;
  endfunction

  task automatic check(input logic signed [W-1:0] v);
    a = v;
    #1;
    checks += 2;
    if (longint'(p0) != ref_mul(longint'(v), longint'(C0))) begin
      failures++;
      $display("FAIL sqrt2: a=%0d got %0d exp %0d", v, p0, ref_mul(v, C0));
    end
    if (longint'(p1) != ref_mul(longint'(v), longint'(C1))) begin
      failures++;
      $display("FAIL cos: a=%0d got %0d exp %0d", v, p1, ref_mul(v, C1));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0); check(1); check(-1); check(32767); check(-32768);
    check(32'sd1 <<< 28); check(-(32'sd1 <<< 28));
    for (int i = 0; i < 2000; i++) begin
      logic signed [W-1:0] r;
      r = $signed($urandom) >>> ($urandom_range(3, 24));
      check(r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
