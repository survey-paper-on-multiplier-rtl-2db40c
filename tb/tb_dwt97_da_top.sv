// tb_dwt97_da_top: end-to-end test of the 9/7 filter pair at its default
// parameters.
//
// A reference model keeps the accepted samples and computes
//   y_h = 71(x[n]+x[n-6]) + 38(x[n-1]+x[n-5]) + 4(x[n-2]+x[n-4]) + 6 x[n-3]
//   y_l = 77(x[n]+x[n-8]) + 34(x[n-1]+x[n-7]) + 10(x[n-2]+x[n-6])
//         + 2(x[n-3]+x[n-5]) + 3 x[n-4]
// with ordinary multiplication. Phases:
//   1. the published example: after reset, samples 0,0,0,4,3,2,1 make
//      r = (1,2,3,4) and the last high-pass output must be 183;
//   2. an impulse, whose outputs must replay the coefficient tables;
//   3. full-scale inputs (all -256, then all 255) for the output width;
//   4. a random stream with random in_valid gaps (stalls).
// Every output must appear exactly one clock after its input (latency 1,
// one sample per clock). Each of the mechanisms (example, impulse, stall,
// back-to-back samples, full-scale negative and positive inputs) is counted
// and a failure is counted for any that never happened.
module tb_dwt97_da_top;
  localparam int DATA_W = 9;
  localparam int Y_W    = 20;
  localparam int HP_C [4] = '{71, 38, 4, 6};
  localparam int LP_C [5] = '{77, 34, 10, 2, 3};

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [DATA_W-1:0] x_in;
  logic out_valid;
  logic signed [Y_W-1:0] y_h;
  logic signed [Y_W-1:0] y_l;

  int checks = 0;
  int failures = 0;
  int hist [9];                 // hist[k] = x[n-k] of the last accepted sample
  int exp_h, exp_l;
  int n_in = 0, n_out = 0;
  int n_example = 0, n_impulse = 0, n_stall = 0, n_b2b = 0, n_neg_fs = 0, n_pos_fs = 0;
  bit prev_valid = 1'b0;

  dwt97_da_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void model_push(int x);
    for (int k = 8; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = x;
    exp_h = HP_C[0] * (hist[0] + hist[6]) + HP_C[1] * (hist[1] + hist[5])
          + HP_C[2] * (hist[2] + hist[4]) + HP_C[3] * hist[3];
    exp_l = LP_C[0] * (hist[0] + hist[8]) + LP_C[1] * (hist[1] + hist[7])
          + LP_C[2] * (hist[2] + hist[6]) + LP_C[3] * (hist[3] + hist[5])
          + LP_C[4] * hist[4];
  endfunction

  // One clock: present (v, x) before the edge, check the outputs after it.
  task automatic step(bit v, int x);
    @(negedge clk);
    in_valid = v;
    x_in     = DATA_W'(x);
    if (v) begin
      model_push(x);
      n_in++;
      if (prev_valid) n_b2b++;
      if (x == -256) n_neg_fs++;
      if (x == 255)  n_pos_fs++;
    end else begin
      n_stall++;
    end
    @(posedge clk);
    #1;
    checks++;
    if (out_valid != v) begin
      failures++;
      $display("FAIL out_valid=%0b one clock after in_valid=%0b", out_valid, v);
    end
    if (v) begin
      n_out++;
      checks += 2;
      if (int'(y_h) != exp_h) begin
        failures++;
        $display("FAIL y_h: got %0d expected %0d", y_h, exp_h);
      end
      if (int'(y_l) != exp_l) begin
        failures++;
        $display("FAIL y_l: got %0d expected %0d", y_l, exp_l);
      end
    end
    prev_valid = v;
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    in_valid = 1'b0;
    for (int k = 0; k < 9; k++) hist[k] = 0;
    prev_valid = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("mechanism %-22s happened %0d times", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", what);
    end
  endtask

  initial begin
    int ex_seq [7] = '{0, 0, 0, 4, 3, 2, 1};
    rst_n = 1'b0; in_valid = 1'b0; x_in = '0;
    do_reset();

    // 1. Published example.
    foreach (ex_seq[i]) step(1'b1, ex_seq[i]);
    checks++;
    if (int'(y_h) != 183) begin
      failures++;
      $display("FAIL example: y_h=%0d expected 183", y_h);
    end else n_example++;

    // 2. Impulse response: output k equals coefficient table entry.
    do_reset();
    for (int t = 0; t < 9; t++) begin
      int eh, el;
      step(1'b1, (t == 0) ? 1 : 0);
      eh = (t <= 6) ? HP_C[(t <= 3) ? t : 6 - t] : 0;
      el = LP_C[(t <= 4) ? t : 8 - t];
      checks += 2;
      if (int'(y_h) != eh || int'(y_l) != el) begin
        failures++;
        $display("FAIL impulse t=%0d: y_h=%0d/%0d y_l=%0d/%0d", t, y_h, eh, y_l, el);
      end
    end
    n_impulse++;

    // 3. Full-scale inputs.
    for (int t = 0; t < 10; t++) step(1'b1, -256);
    for (int t = 0; t < 10; t++) step(1'b1, 255);

    // 4. Random stream with stalls.
    for (int t = 0; t < 3000; t++) begin
      bit v;
      v = ($urandom_range(0, 4) != 0);
      step(v, $signed(DATA_W'($urandom)));
    end
    step(1'b0, 0);

    checks++;
    if (n_out != n_in) begin
      failures++;
      $display("FAIL %0d samples in, %0d results out", n_in, n_out);
    end
    need("published_example", n_example);
    need("impulse_response", n_impulse);
    need("stall", n_stall);
    need("back_to_back", n_b2b);
    need("full_scale_negative", n_neg_fs);
    need("full_scale_positive", n_pos_fs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
