// tb_dht_top -- end-to-end test of the 32-point DHT engine at its default parameters.
//
// Frames of 32 signed 16-bit samples are offered through the in_valid / in_ready
// handshake: full-scale corner frames, random frames, back-to-back bursts and gaps.
// Every output frame is compared with the defining sum
//   X(k) = sum_n x(n) * cas(2*pi*n*k/32)
// in floating point, within TOL LSB (products by irrational constants are rounded).
// Also checked: latency of (core_latency(N)+1)*P cycles from acceptance to out_valid,
// one output frame per P cycles in a burst (N samples per frame period), and that
// out_valid never fires without a frame in flight.
// Mechanisms that must occur at least once: operand interleaving in the shared
// multipliers (all P phases inside one frame period), several frames in flight in the
// pipeline at once, an idle frame slot (bubble), and full-scale frames.
module tb_dht_top;
  import dht_pkg::*;
  localparam int  N    = 32;
  localparam int  W_IN = 16;
  localparam int  P    = 4;
  localparam int  WO   = out_width(N, W_IN);
  localparam int  LATC = (core_latency(N) + 1) * P;
  localparam real PI   = 3.14159265358979323846;
  localparam real TOL  = 1.0;
  localparam int  NFRAMES = 400;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid;
  logic signed [W_IN-1:0] x [N];
  logic signed [WO-1:0]   X [N];
  int checks = 0, failures = 0;
  longint cycle = 0;

  dht_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .x(x),
    .out_valid(out_valid), .X(X)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Expected spectra and acceptance times of the frames in flight.
  real    exp_q [$];   // N expected coefficients per frame in flight
  longint t_q   [$];
  int     sent = 0, received = 0, slot = 0;
  int     n_interleave = 0, n_overlap = 0, n_bubble = 0, n_fullscale = 0;
  longint last_out = -1;
  int     n_burst_gap_ok = 0;
  real    max_err = 0.0;

  task automatic make_frame(input int f, output logic signed [W_IN-1:0] s [N]);
    for (int n = 0; n < N; n++) begin
      case (f)
        0:       s[n] = 16'sh7fff;
        1:       s[n] = -16'sh8000;
        2:       s[n] = (n % 2 == 1) ? 16'sh7fff : -16'sh8000;
        3:       s[n] = (n % 4 < 2) ? 16'sh7fff : -16'sh8000;
        4:       s[n] = (n == 0) ? 16'sh7fff : 16'sh0000;
        5:       s[n] = ((n / 2) % 2 == 1) ? -16'sh8000 : 16'sh7fff;
        default: s[n] = $signed(16'($urandom));
      endcase
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Driver: offers a new frame at every in_ready slot, except for planned gaps.
  initial begin
    logic signed [W_IN-1:0] s [N];
    repeat (5) @(posedge clk);
    rst_n <= 1;
    make_frame(0, s);
    while (sent < NFRAMES) begin
      @(negedge clk);
      if (in_ready) begin
        // Gaps: every 37th slot and a run of idle slots around frame 200.
        slot++;
        if ((slot % 37 == 20) || (sent >= 200 && sent < 203 && $urandom_range(0, 1) == 0)) begin
          in_valid = 0;
          if (sent >= 200 && sent < 203) sent++;  // skip the frame altogether
          n_bubble++;
        end else begin
          real r [N];
          in_valid = 1;
          x = s;
          if (sent < 6) n_fullscale++;
          for (int k = 0; k < N; k++) begin
            real a;
            r[k] = 0.0;
            for (int n = 0; n < N; n++) begin
              a = 2.0 * PI * real'((n * k) % N) / real'(N);
              r[k] += real'(s[n]) * ($cos(a) + $sin(a));
            end
          end
          for (int k = 0; k < N; k++) exp_q.push_back(r[k]);
          t_q.push_back(cycle + 1);
          sent++;
          make_frame(sent, s);
        end
      end else begin
        in_valid = 1'($urandom_range(0, 1));  // ignored outside in_ready
      end
    end
    @(negedge clk);
    in_valid = 0;
  end

  // Monitor.
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.phase == 2'(P - 1)) n_interleave++;
      if (t_q.size() >= 3) n_overlap++;
    end
    if (rst_n && out_valid) begin
      checks++;
      if (t_q.size() == 0) begin
        failures++;
        $display("FAIL out_valid with no frame in flight at cycle %0d", cycle);
      end else begin
        real    r [N];
        longint t0;
        for (int k = 0; k < N; k++) r[k] = exp_q.pop_front();
        t0 = t_q.pop_front();
        received++;
        checks++;
        if (cycle - t0 != longint'(LATC)) begin
          failures++;
          $display("FAIL latency %0d cycles, expected %0d", cycle - t0, LATC);
        end
        if (last_out >= 0 && cycle - last_out == longint'(P)) n_burst_gap_ok++;
        last_out = cycle;
        for (int k = 0; k < N; k++) begin
          real e;
          e = real'(X[k]) - r[k];
          if (e < 0) e = -e;
          if (e > max_err) max_err = e;
          checks++;
          if (e > TOL) begin
            failures++;
            $display("FAIL frame %0d X[%0d]=%0d exp %f", received - 1, k, X[k], r[k]);
          end
        end
      end
    end
  end

  initial begin
    wait (sent == NFRAMES);
    repeat (LATC + 3 * P) @(posedge clk);
    checks++;
    if (t_q.size() != 0) begin
      failures++;
      $display("FAIL %0d frames never came out", t_q.size());
    end
    $display("INFO frames=%0d interleave_periods=%0d overlap_cycles=%0d bubbles=%0d fullscale=%0d burst_spacing_ok=%0d max_err=%f",
             received, n_interleave, n_overlap, n_bubble, n_fullscale, n_burst_gap_ok, max_err);
    checks += 5;
    if (n_interleave == 0)   begin failures++; $display("FAIL no shared-multiplier interleave seen"); end
    if (n_overlap == 0)      begin failures++; $display("FAIL pipeline never held 3 frames"); end
    if (n_bubble == 0)       begin failures++; $display("FAIL no bubble"); end
    if (n_fullscale == 0)    begin failures++; $display("FAIL no full-scale frame"); end
    if (n_burst_gap_ok == 0) begin failures++; $display("FAIL no back-to-back outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
