// tb_phase_ctrl -- checks the phase counter and the frame strobe of the shared multipliers.
//
// After reset the phase must run 0,1,..,P-1,0,.. and frame_stb must be high exactly in
// phase P-1, i.e. once every P cycles. Checked for P = 4 and P = 3.
module tb_phase_ctrl;
  logic clk = 0, rst_n = 0;
  logic [1:0] ph4, ph3;
  logic       fs4, fs3;
  int checks = 0, failures = 0;
  int exp4, exp3, cnt_fs4;

  phase_ctrl #(.P(4)) dut4 (.clk(clk), .rst_n(rst_n), .phase(ph4), .frame_stb(fs4));
  phase_ctrl #(.P(3)) dut3 (.clk(clk), .rst_n(rst_n), .phase(ph3), .frame_stb(fs3));

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    exp4 = 0; exp3 = 0; cnt_fs4 = 0;
    @(negedge clk);
    for (int c = 0; c < 40; c++) begin
      checks += 4;
      if (ph4 != 2'(exp4)) begin failures++; $display("FAIL P4 phase %0d exp %0d", ph4, exp4); end
      if (fs4 != (exp4 == 3)) begin failures++; $display("FAIL P4 strobe at phase %0d", exp4); end
      if (ph3 != 2'(exp3)) begin failures++; $display("FAIL P3 phase %0d exp %0d", ph3, exp3); end
      if (fs3 != (exp3 == 2)) begin failures++; $display("FAIL P3 strobe at phase %0d", exp3); end
      if (fs4) cnt_fs4++;
      exp4 = (exp4 + 1) % 4;
      exp3 = (exp3 + 1) % 3;
      @(negedge clk);
    end
    checks++;
    if (cnt_fs4 != 10) begin failures++; $display("FAIL strobe count %0d", cnt_fs4); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
