// tb_dht_sizes -- runs the DHT engine at the other transform lengths of the arithmetic
// cost comparison: N = 8, 16, 64, 128 and 256 (N = 32 is covered by tb_dht_top), and
// the 32-point engine without multiplier sharing (P = 1), which takes a frame of 32
// samples in every clock cycle, and with two- and three-way sharing (P = 2, 3).
//
// Each instance gets a few full-scale and random frames, back to back, and every
// coefficient is compared with sum_n x(n) * cas(2*pi*n*k/N) in floating point, within
// TOL LSB. Above 32 points the guard bits and constant precision are widened with N.
// The latency of each instance is checked against (core_latency(N)+1)*P.
module tb_dht_sizes;
  import dht_pkg::*;
  localparam int  W_IN = 16;
  localparam int  P    = 4;
  localparam real PI   = 3.14159265358979323846;
  localparam real TOL  = 1.0;
  localparam int  NFR  = 6;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int done = 0;

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1;
  end

  for (genvar g = 0; g < 8; g++) begin : g_size
    localparam int N   = (g == 0) ? 8 : (g == 1) ? 16 : (g == 2) ? 64 : (g == 3) ? 128 : (g == 4) ? 256 : 32;
    localparam int PG  = (g == 5) ? 1 : (g == 6) ? 2 : (g == 7) ? 3 : P;
    localparam int WO  = out_width(N, W_IN);
    localparam int LAT = (core_latency(N) + 1) * PG;
    // Each level above 32 points amplifies rounding errors about threefold and makes
    // the auxiliary sequences larger, so these sizes get 2 more guard bits and 2 more
    // constant bits per level to stay within 1 LSB.
    localparam int XB  = (N > 32) ? 2 * ($clog2(N) - 5) : 0;

    logic in_valid = 0, in_ready, out_valid;
    logic signed [W_IN-1:0] x [N];
    logic signed [WO-1:0]   X [N];
    real    expv [$];
    longint tin  [$];
    longint cyc = 0, last = -1;
    int     nout = 0;

    dht_top #(.N(N), .P(PG), .GB(4 + XB), .CF(24 + XB)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .x(x),
      .out_valid(out_valid), .X(X));

    always @(posedge clk) cyc <= cyc + 1;

    initial begin
      int f;
      f = 0;
      @(posedge rst_n);
      while (f < NFR) begin
        @(negedge clk);
        if (in_ready) begin
          for (int n = 0; n < N; n++) begin
            case (f)
              0:       x[n] = (n % 2 == 1) ? 16'sh7fff : -16'sh8000;
              1:       x[n] = (n % 4 < 2) ? 16'sh7fff : -16'sh8000;
              default: x[n] = $signed(16'($urandom));
            endcase
          end
          for (int k = 0; k < N; k++) begin
            real r;
            r = 0.0;
            for (int n = 0; n < N; n++) begin
              real a;
              a = 2.0 * PI * real'((n * k) % N) / real'(N);
              r += real'(x[n]) * ($cos(a) + $sin(a));
            end
            expv.push_back(r);
          end
          tin.push_back(cyc + 1);
          in_valid = 1;
          f++;
        end
      end
      @(negedge clk);
      in_valid = 0;
    end

    always @(posedge clk) begin
      if (rst_n && out_valid) begin
        longint t0;
        t0 = tin.pop_front();
        checks++;
        if (cyc - t0 != longint'(LAT)) begin
          failures++;
          $display("FAIL N=%0d latency %0d exp %0d", N, cyc - t0, LAT);
        end
        for (int k = 0; k < N; k++) begin
          real e;
          e = real'(X[k]) - expv.pop_front();
          checks++;
          if (e > TOL || e < -TOL) begin
            failures++;
            $display("FAIL N=%0d frame %0d X[%0d]=%0d err %f", N, nout, k, X[k], e);
          end
        end
        // Back-to-back frames must come out one frame period apart.
        if (last >= 0) begin
          checks++;
          if (cyc - last != longint'(PG)) begin
            failures++;
            $display("FAIL N=%0d P=%0d output spacing %0d", N, PG, cyc - last);
          end
        end
        last = cyc;
        nout++;
        if (nout == NFR) done++;
      end
    end
  end

  initial begin
    wait (done == 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
