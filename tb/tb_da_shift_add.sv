// tb_da_shift_add: self-checking test of the DA shift-and-add chain.
// Checks the published example (plane sums 1,7,10,0,0,2,1 give 183), then
// random plane sums. Planes not flagged as used are given random non-zero
// values, which must not reach the result.
module tb_da_shift_add;
  localparam int COEF_W = 7;
  localparam int P_W    = 11;
  localparam int OUT_W  = P_W + COEF_W;
  localparam logic [COEF_W-1:0] USED = 7'b110_0111;

  logic signed [P_W-1:0]   p [COEF_W];
  logic signed [OUT_W-1:0] y;

  int checks = 0;
  int failures = 0;

  da_shift_add #(.COEF_W(COEF_W), .P_W(P_W), .OUT_W(OUT_W), .ROW_USED(USED)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_y();
    int s = 0;
    for (int i = 0; i < COEF_W; i++) if (USED[i]) s += int'(p[i]) * (1 << i);
    return s;
  endfunction

  initial begin
    p = '{11'sd1, 11'sd7, 11'sd10, 11'sd0, 11'sd0, 11'sd2, 11'sd1};
    #1;
    checks++;
    if (int'(y) != 183) begin
      failures++;
      $display("FAIL example: got %0d expected 183", y);
    end
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < COEF_W; i++) p[i] = P_W'($urandom);
      if (n == 0) for (int i = 0; i < COEF_W; i++) p[i] = -1024;
      #1;
      checks++;
      if (int'(y) != expect_y()) begin
        failures++;
        $display("FAIL random: got %0d expected %0d", y, expect_y());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
