// tb_da_unit: self-checking test of the complete distributed-arithmetic
// unit. The published high-pass example (coefficients 71,38,4,6 applied to
// 1,2,3,4) must give 183; random and extreme inputs to the high-pass and
// low-pass units are compared with ordinary multiply-accumulate.
module tb_da_unit;
  localparam int IN_W = 9;
  localparam int HP_C [4] = '{71, 38, 4, 6};
  localparam int LP_C [5] = '{77, 34, 10, 2, 3};

  logic signed [IN_W-1:0] hr [4];
  logic signed [IN_W-1:0] lr [5];
  logic signed [IN_W+2+7-1:0] hy;
  logic signed [IN_W+3+7-1:0] ly;

  int checks = 0;
  int failures = 0;

  da_unit #(.NIN(4), .COEF_W(7), .IN_W(IN_W), .COEFS({7'd6, 7'd4, 7'd38, 7'd71}))
    dut_hp (.r(hr), .y(hy));
  da_unit #(.NIN(5), .COEF_W(7), .IN_W(IN_W), .COEFS({7'd3, 7'd2, 7'd10, 7'd34, 7'd77}))
    dut_lp (.r(lr), .y(ly));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_both();
    int eh = 0, el = 0;
    #1;
    for (int k = 0; k < 4; k++) eh += HP_C[k] * int'(hr[k]);
    for (int k = 0; k < 5; k++) el += LP_C[k] * int'(lr[k]);
    checks += 2;
    if (int'(hy) != eh) begin failures++; $display("FAIL hp: got %0d expected %0d", hy, eh); end
    if (int'(ly) != el) begin failures++; $display("FAIL lp: got %0d expected %0d", ly, el); end
  endtask

  initial begin
    hr = '{9'sd1, 9'sd2, 9'sd3, 9'sd4};
    lr = '{9'sd1, 9'sd2, 9'sd3, 9'sd4, 9'sd5};
    #1;
    checks++;
    if (int'(hy) != 183) begin failures++; $display("FAIL example: got %0d expected 183", hy); end
    check_both();
    for (int k = 0; k < 4; k++) hr[k] = -256;
    for (int k = 0; k < 5; k++) lr[k] = -256;
    check_both();
    for (int k = 0; k < 4; k++) hr[k] = 255;
    for (int k = 0; k < 5; k++) lr[k] = 255;
    check_both();
    for (int n = 0; n < 3000; n++) begin
      for (int k = 0; k < 4; k++) hr[k] = IN_W'($urandom);
      for (int k = 0; k < 5; k++) lr[k] = IN_W'($urandom);
      check_both();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
