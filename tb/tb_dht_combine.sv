// tb_dht_combine -- checks the combining stage for N = 16 and N = 32.
//
// Random half-length spectra E, U and a random u0 are applied for one frame period.
// The expected outputs use the combining equations in their original form, with
// V(k) = U(k) - u0/2 and the factor 2*cos(2*pi*k/N), in floating point:
//   X(k)     = E(k) + u0*sin + 2*cos*V(k),      X(N/2+k) = E(k) - u0*sin - 2*cos*V(k)
//   X(N/2-k) = E(N/2-k) + u0*sin - 2*cos*V(N/2-k), X(N-k) = E(N/2-k) - u0*sin + 2*cos*V(N/2-k)
// Tolerance: two rounded products, each off by at most 0.5 + |operand| * 2^-(CF+1).
module tb_dht_combine;
  localparam int  W  = 32;
  localparam int  CF = 16;
  localparam int  P  = 4;
  localparam int  AMP = 1 << 18;   // operand range +/- AMP
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 2.0 * (0.5 + 3.0 * AMP / (2.0 ** (CF + 1))) + 0.01;

  logic clk = 0;
  logic [1:0] phase = 0;
  logic signed [W-1:0] e16 [8],  u16 [8],  x16 [16], u0_16;
  logic signed [W-1:0] e32 [16], u32 [16], x32 [32], u0_32;
  int checks = 0, failures = 0;

  dht_combine #(.N(16), .W(W), .CF(CF), .P(P)) dut16 (
    .clk(clk), .phase(phase), .E(e16), .U(u16), .u0(u0_16), .X(x16));
  dht_combine #(.N(32), .W(W), .CF(CF), .P(P)) dut32 (
    .clk(clk), .phase(phase), .E(e32), .U(u32), .u0(u0_32), .X(x32));

  always #5 clk = ~clk;

  function automatic logic signed [W-1:0] rnd();
    return W'($signed($urandom_range(0, 2 * AMP)) - AMP);
  endfunction

  task automatic chk(input int n, input int k, input longint got, input real exp);
    checks++;
    if ((real'(got) - exp > TOL) || (exp - real'(got) > TOL)) begin
      failures++;
      $display("FAIL N=%0d X[%0d]=%0d exp %f", n, k, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 200; f++) begin
      for (int i = 0; i < 8; i++)  begin e16[i] = rnd(); u16[i] = rnd() >>> 1; end
      for (int i = 0; i < 16; i++) begin e32[i] = rnd(); u32[i] = rnd() >>> 1; end
      u0_16 = rnd(); u0_32 = rnd();
      for (int ph = 0; ph < P; ph++) begin
        phase = 2'(ph);
        if (ph == P - 1) begin
          #1;
          for (int k = 0; k < 4; k++) begin
            real s, c, v;
            s = real'(u0_16) * $sin(2.0 * PI * k / 16.0);
            c = 2.0 * $cos(2.0 * PI * k / 16.0);
            v = real'(u16[k]) - real'(u0_16) / 2.0;
            chk(16, k,     x16[k],     real'(e16[k]) + s + c * v);
            chk(16, 8 + k, x16[8 + k], real'(e16[k]) - s - c * v);
          end
          for (int k = 1; k <= 4; k++) begin
            real s, c, v;
            s = real'(u0_16) * $sin(2.0 * PI * k / 16.0);
            c = 2.0 * $cos(2.0 * PI * k / 16.0);
            v = real'(u16[8 - k]) - real'(u0_16) / 2.0;
            chk(16, 8 - k,  x16[8 - k],  real'(e16[8 - k]) + s - c * v);
            chk(16, 16 - k, x16[16 - k], real'(e16[8 - k]) - s + c * v);
          end
          for (int k = 0; k < 8; k++) begin
            real s, c, v;
            s = real'(u0_32) * $sin(2.0 * PI * k / 32.0);
            c = 2.0 * $cos(2.0 * PI * k / 32.0);
            v = real'(u32[k]) - real'(u0_32) / 2.0;
            chk(32, k,      x32[k],      real'(e32[k]) + s + c * v);
            chk(32, 16 + k, x32[16 + k], real'(e32[k]) - s - c * v);
          end
          for (int k = 1; k <= 8; k++) begin
            real s, c, v;
            s = real'(u0_32) * $sin(2.0 * PI * k / 32.0);
            c = 2.0 * $cos(2.0 * PI * k / 32.0);
            v = real'(u32[16 - k]) - real'(u0_32) / 2.0;
            chk(32, 16 - k, x32[16 - k], real'(e32[16 - k]) + s - c * v);
            chk(32, 32 - k, x32[32 - k], real'(e32[16 - k]) - s + c * v);
          end
        end
        @(posedge clk);
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
