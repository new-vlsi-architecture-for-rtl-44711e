// tb_dht8 -- checks the 8-point DHT kernel against the defining sum.
//
// Random and extreme 16-bit frames are applied for one frame period each (P = 4
// phases driven by the testbench). In phase P-1 every output must be within 1 LSB of
// sum_n x(n) * cas(2*pi*n*k/8) evaluated in floating point.
module tb_dht8;
  localparam int  W  = 32;
  localparam int  CF = 16;
  localparam int  P  = 4;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0;
  logic [1:0] phase = 0;
  logic signed [W-1:0] x [8], X [8];
  int checks = 0, failures = 0;

  dht8 #(.W(W), .CF(CF), .P(P)) dut (.clk(clk), .phase(phase), .x(x), .X(X));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 300; f++) begin
      for (int n = 0; n < 8; n++) begin
        case (f)
          0:       x[n] = 32767;
          1:       x[n] = (n % 2) ? -32768 : 32767;
          2:       x[n] = (n == 1 || n == 3) ? 32767 : -32768;
          default: x[n] = $signed(16'($urandom));
        endcase
      end
      for (int ph = 0; ph < P; ph++) begin
        phase = 2'(ph);
        if (ph == P - 1) begin
          #1;
          for (int k = 0; k < 8; k++) begin
            real r, a;
            r = 0.0;
            for (int n = 0; n < 8; n++) begin
              a = 2.0 * PI * real'(n * k) / 8.0;
              r += real'(x[n]) * ($cos(a) + $sin(a));
            end
            checks++;
            if ((real'(X[k]) - r > 1.0) || (r - real'(X[k]) > 1.0)) begin
              failures++;
              $display("FAIL f=%0d X[%0d]=%0d exp %f", f, k, X[k], r);
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
