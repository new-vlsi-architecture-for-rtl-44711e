// tb_dht_core -- checks the recursive core at N = 16 (two 8-point kernels, one
// combining stage, one pipeline register) with a new frame in every frame period.
//
// The testbench drives the phase (P = 4) and the frame strobe itself and changes the
// input right after each strobe. The spectrum of the frame applied in period t must
// appear in phase P-1 of period t + core_latency(16) and match
// sum_n x(n) * cas(2*pi*n*k/16) within TOL. The core has no guard bits here, so the
// tolerance covers the product roundings amplified by the combining stage (3*0.5+1).
module tb_dht_core;
  import dht_pkg::*;
  localparam int  N   = 16;
  localparam int  W   = 32;
  localparam int  CF  = 24;
  localparam int  P   = 4;
  localparam int  LAT = core_latency(N);
  localparam real PI  = 3.14159265358979323846;
  localparam real TOL = 2.5;

  logic clk = 0;
  logic [1:0] phase = 0;
  logic frame_stb;
  logic signed [W-1:0] x [N], X [N];
  real  hist [LAT+1][N];
  int   checks = 0, failures = 0;

  assign frame_stb = (phase == 2'(P - 1));

  dht_core #(.N(N), .W(W), .CF(CF), .P(P)) dut (
    .clk(clk), .phase(phase), .frame_stb(frame_stb), .x(x), .X(X));

  always #5 clk = ~clk;

  task automatic load(input int f);
    for (int n = 0; n < N; n++) begin
      case (f)
        0:       x[n] = 32767;
        1:       x[n] = (n % 2) ? 32767 : -32768;
        2:       x[n] = (n % 4 < 2) ? 32767 : -32768;
        default: x[n] = W'($signed(16'($urandom)));
      endcase
    end
    for (int s = LAT; s > 0; s--) hist[s] = hist[s-1];
    for (int k = 0; k < N; k++) begin
      hist[0][k] = 0.0;
      for (int n = 0; n < N; n++) begin
        real a;
        a = 2.0 * PI * real'((n * k) % N) / real'(N);
        hist[0][k] += real'(x[n]) * ($cos(a) + $sin(a));
      end
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 300; f++) begin
      load(f);
      for (int ph = 0; ph < P; ph++) begin
        phase = 2'(ph);
        if (ph == P - 1 && f >= LAT) begin
          #1;
          for (int k = 0; k < N; k++) begin
            checks++;
            if ((real'(X[k]) - hist[LAT][k] > TOL) || (hist[LAT][k] - real'(X[k]) > TOL)) begin
              failures++;
              $display("FAIL frame %0d X[%0d]=%0d exp %f", f - LAT, k, X[k], hist[LAT][k]);
            end
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
