// tb_aux_seq -- checks the auxiliary sequence of the length-doubling step.
//
// For random odd samples the output must satisfy u(L-1) = xo(L-1) and
// u(i) + u(i+1) = xo(i); the expected values are built back to front in the testbench.
module tb_aux_seq;
  localparam int L = 16;
  localparam int W = 32;
  logic signed [W-1:0] xo [L];
  logic signed [W-1:0] u  [L];
  int checks = 0, failures = 0;

  aux_seq #(.L(L), .W(W)) dut (.xo(xo), .u(u));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      longint expu [L];
      for (int i = 0; i < L; i++) xo[i] = $signed(16'($urandom));
      #1;
      // Alternating-sum closed form: u(i) = sum_{j>=i} (-1)^(j-i) xo(j).
      for (int i = 0; i < L; i++) begin
        expu[i] = 0;
        for (int j = i; j < L; j++) expu[i] += ((j - i) % 2 == 0) ? longint'(xo[j]) : -longint'(xo[j]);
      end
      for (int i = 0; i < L; i++) begin
        checks++;
        if (longint'(u[i]) != expu[i]) begin
          failures++;
          $display("FAIL t=%0d u[%0d]=%0d exp %0d", t, i, u[i], expu[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
