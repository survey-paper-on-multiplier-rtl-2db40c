// dwt97_da_top: multiplier-less 9/7 wavelet filter pair using ROM-less
// distributed arithmetic.
//
// One input sample Y(n) per clock (when in_valid is high) enters a delay
// line holding Y(n-1) .. Y(n-8). Because both filters are symmetric, tap
// pairs sharing a coefficient are added first:
//   high pass (7 taps): r1 = Y(n)+Y(n-6), r2 = Y(n-1)+Y(n-5),
//                       r3 = Y(n-2)+Y(n-4), r4 = Y(n-3)
//   low pass  (9 taps): r1 = Y(n)+Y(n-8), r2 = Y(n-1)+Y(n-7),
//                       r3 = Y(n-2)+Y(n-6), r4 = Y(n-3)+Y(n-5), r5 = Y(n-4)
// Each filter's r vector goes to a distributed-arithmetic unit that forms
// the inner product with the scaled coefficients (high pass 71,38,4,6; low
// pass 77,34,10,2,3) using only adders: y_h = sum g_k r_(k+1) and
// y_l = sum h_k r_(k+1). The high-pass wiring and coefficient order are the
// published ones; the low-pass coefficient order (h0 on the outermost pair,
// h4 on the centre tap) follows the same convention and is this design's
// choice, as are the valid handshake, the data width and the reset.
//
// Interface and timing: x_in is a DATA_W-bit two's complement sample taken
// when in_valid is high (the default of 9 bits holds an 8-bit unsigned
// pixel, zero-extended, or a signed value from -256 to 255); in_valid low
// stalls the delay line. The results for that sample appear on y_h / y_l
// one clock later with out_valid high.
// Throughput is one sample per clock, every adder is used on every sample.
// The outputs are full precision at 128 times the real filter gain and are
// produced for every input sample; decimation by two for a wavelet
// decomposition level is left to the consumer. Reset (rst_n, asynchronous,
// active low) clears the delay line and the outputs.
module dwt97_da_top
  import dwt97_pkg::*;
#(
  parameter int DATA_W = 9,
  parameter coef_t [HP_N-1:0] HP_COEF = HP_COEFS,
  parameter coef_t [LP_N-1:0] LP_COEF = LP_COEFS,
  parameter int Y_W = DATA_W + 1 + $clog2(LP_N) + COEF_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_in,
  output logic                     out_valid,
  output logic signed [Y_W-1:0]    y_h,
  output logic signed [Y_W-1:0]    y_l
);

  localparam int R_W = DATA_W + 1;

  logic signed [DATA_W-1:0] taps [DELAY_TAPS];   // taps[k] = Y(n-1-k)

  tap_delay_line #(.DATA_W(DATA_W), .DEPTH(DELAY_TAPS)) u_delay (
    .clk(clk), .rst_n(rst_n), .en(in_valid), .din(x_in), .taps(taps)
  );

  // ---------------- high pass: 3 pre-adders + centre tap ----------------
  logic signed [DATA_W-1:0] hp_a [3];
  logic signed [DATA_W-1:0] hp_b [3];
  logic signed [R_W-1:0]    hp_s [3];
  logic signed [R_W-1:0]    hp_r [HP_N];

  assign hp_a = '{x_in,    taps[0], taps[1]};    // Y(n),   Y(n-1), Y(n-2)
  assign hp_b = '{taps[5], taps[4], taps[3]};    // Y(n-6), Y(n-5), Y(n-4)

  tap_pair_adder #(.DATA_W(DATA_W), .NPAIRS(3)) u_hp_pre (
    .a(hp_a), .b(hp_b), .s(hp_s)
  );

  assign hp_r = '{hp_s[0], hp_s[1], hp_s[2], R_W'(taps[2])};   // r4 = Y(n-3)

  logic signed [Y_W-1:0] hp_y;

  da_unit #(
    .NIN(HP_N), .COEF_W(COEF_W), .IN_W(R_W), .COEFS(HP_COEF), .OUT_W(Y_W)
  ) u_hp_da (
    .r(hp_r), .y(hp_y)
  );

  // ---------------- low pass: 4 pre-adders + centre tap -----------------
  logic signed [DATA_W-1:0] lp_a [4];
  logic signed [DATA_W-1:0] lp_b [4];
  logic signed [R_W-1:0]    lp_s [4];
  logic signed [R_W-1:0]    lp_r [LP_N];

  assign lp_a = '{x_in,    taps[0], taps[1], taps[2]};   // Y(n) .. Y(n-3)
  assign lp_b = '{taps[7], taps[6], taps[5], taps[4]};   // Y(n-8) .. Y(n-5)

  tap_pair_adder #(.DATA_W(DATA_W), .NPAIRS(4)) u_lp_pre (
    .a(lp_a), .b(lp_b), .s(lp_s)
  );

  assign lp_r = '{lp_s[0], lp_s[1], lp_s[2], lp_s[3], R_W'(taps[3])};  // r5 = Y(n-4)

  logic signed [Y_W-1:0] lp_y;

  da_unit #(
    .NIN(LP_N), .COEF_W(COEF_W), .IN_W(R_W), .COEFS(LP_COEF), .OUT_W(Y_W)
  ) u_lp_da (
    .r(lp_r), .y(lp_y)
  );

  // ---------------- output register ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y_h       <= '0;
      y_l       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y_h <= hp_y;
        y_l <= lp_y;
      end
    end
  end

endmodule
