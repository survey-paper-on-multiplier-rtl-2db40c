// tb_tap_pair_adder: self-checking test of the symmetric-tap pre-adders.
// Applies the extreme two's complement operands and random ones to four
// pairs and compares each sum with integer addition, which must never
// overflow the one-bit-wider result.
module tb_tap_pair_adder;
  localparam int DATA_W = 8;
  localparam int NPAIRS = 4;

  logic signed [DATA_W-1:0] a [NPAIRS];
  logic signed [DATA_W-1:0] b [NPAIRS];
  logic signed [DATA_W:0]   s [NPAIRS];

  int checks = 0;
  int failures = 0;

  tap_pair_adder #(.DATA_W(DATA_W), .NPAIRS(NPAIRS)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    #1;
    for (int k = 0; k < NPAIRS; k++) begin
      checks++;
      if (int'(s[k]) != int'(a[k]) + int'(b[k])) begin
        failures++;
        $display("FAIL pair %0d: %0d + %0d gave %0d", k, a[k], b[k], s[k]);
      end
    end
  endtask

  initial begin
    // Corners: both most negative, both most positive, mixed.
    for (int k = 0; k < NPAIRS; k++) begin a[k] = -128; b[k] = -128; end
    check_all();
    for (int k = 0; k < NPAIRS; k++) begin a[k] = 127; b[k] = 127; end
    check_all();
    for (int k = 0; k < NPAIRS; k++) begin a[k] = 127; b[k] = -128; end
    check_all();
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < NPAIRS; k++) begin
        a[k] = DATA_W'($urandom);
        b[k] = DATA_W'($urandom);
      end
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
