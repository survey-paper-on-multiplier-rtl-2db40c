// tb_tap_delay_line: self-checking test of the sample delay line.
// Drives a random sample stream with random enable gaps and compares every
// tap, every cycle, with a software shift register. Also checks reset
// clears all taps and that a sample reaches taps[0] one clock after it is
// accepted (one register per delay element).
module tb_tap_delay_line;
  localparam int DATA_W = 8;
  localparam int DEPTH  = 8;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic signed [DATA_W-1:0] din;
  logic signed [DATA_W-1:0] taps [DEPTH];

  int checks = 0;
  int failures = 0;
  int model [DEPTH];

  tap_delay_line #(.DATA_W(DATA_W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int k = 0; k < DEPTH; k++) begin
      checks++;
      if (int'(taps[k]) != model[k]) begin
        failures++;
        $display("FAIL %s tap %0d: got %0d expected %0d", what, k, taps[k], model[k]);
      end
    end
  endtask

  initial begin
    en = 1'b0; din = '0; rst_n = 1'b0;
    for (int k = 0; k < DEPTH; k++) model[k] = 0;
    repeat (2) @(negedge clk);
    compare("reset");
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 1000; cyc++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      din = DATA_W'($urandom);
      @(posedge clk);
      if (en) begin
        for (int k = DEPTH-1; k > 0; k--) model[k] = model[k-1];
        model[0] = int'(din);
      end
      #1 compare("run");
    end
    // Reset in the middle of a stream clears the line again.
    @(negedge clk);
    rst_n = 1'b0;
    for (int k = 0; k < DEPTH; k++) model[k] = 0;
    #1 compare("mid-stream reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
