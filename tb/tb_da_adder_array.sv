// tb_da_adder_array: self-checking test of the DA adder array.
// Checks the published high-pass example (inputs 1,2,3,4 give the bit-plane
// sums 1,7,10,0,0,2,1) and random inputs for both the high-pass (71,38,4,6)
// and low-pass (77,34,10,2,3) coefficient sets. The expected partial sums
// are formed directly from the coefficient bits, without any reuse.
module tb_da_adder_array;
  localparam int IN_W = 9;
  localparam int HP_N = 4;
  localparam int LP_N = 5;
  localparam int HP_PW = IN_W + 2;
  localparam int LP_PW = IN_W + 3;
  localparam int HP_C [HP_N] = '{71, 38, 4, 6};
  localparam int LP_C [LP_N] = '{77, 34, 10, 2, 3};

  logic signed [IN_W-1:0]  hr [HP_N];
  logic signed [HP_PW-1:0] hp [7];
  logic signed [IN_W-1:0]  lr [LP_N];
  logic signed [LP_PW-1:0] lp [7];

  int checks = 0;
  int failures = 0;

  da_adder_array #(.NIN(HP_N), .COEF_W(7), .IN_W(IN_W),
                   .COEFS({7'd6, 7'd4, 7'd38, 7'd71})) dut_hp (.r(hr), .p(hp));
  da_adder_array #(.NIN(LP_N), .COEF_W(7), .IN_W(IN_W),
                   .COEFS({7'd3, 7'd2, 7'd10, 7'd34, 7'd77})) dut_lp (.r(lr), .p(lp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int hp_expect(int i);
    int s = 0;
    for (int k = 0; k < HP_N; k++) if ((HP_C[k] >> i) & 1) s += int'(hr[k]);
    return s;
  endfunction

  function automatic int lp_expect(int i);
    int s = 0;
    for (int k = 0; k < LP_N; k++) if ((LP_C[k] >> i) & 1) s += int'(lr[k]);
    return s;
  endfunction

  task automatic check_planes();
    #1;
    for (int i = 0; i < 7; i++) begin
      checks += 2;
      if (int'(hp[i]) != hp_expect(i)) begin
        failures++;
        $display("FAIL hp plane %0d: got %0d expected %0d", i, hp[i], hp_expect(i));
      end
      if (int'(lp[i]) != lp_expect(i)) begin
        failures++;
        $display("FAIL lp plane %0d: got %0d expected %0d", i, lp[i], lp_expect(i));
      end
    end
  endtask

  initial begin
    int ex [7] = '{1, 7, 10, 0, 0, 2, 1};
    hr = '{9'sd1, 9'sd2, 9'sd3, 9'sd4};
    lr = '{9'sd1, 9'sd2, 9'sd3, 9'sd4, 9'sd5};
    #1;
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (int'(hp[i]) != ex[i]) begin
        failures++;
        $display("FAIL example P%0d: got %0d expected %0d", i + 1, hp[i], ex[i]);
      end
    end
    // Extremes then random values.
    for (int k = 0; k < HP_N; k++) hr[k] = -256;
    for (int k = 0; k < LP_N; k++) lr[k] = -256;
    check_planes();
    for (int k = 0; k < HP_N; k++) hr[k] = 255;
    for (int k = 0; k < LP_N; k++) lr[k] = 255;
    check_planes();
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < HP_N; k++) hr[k] = IN_W'($urandom);
      for (int k = 0; k < LP_N; k++) lr[k] = IN_W'($urandom);
      check_planes();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
