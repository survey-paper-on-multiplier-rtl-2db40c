// da_adder_array: the adder array of a ROM-less distributed-arithmetic unit.
//
// The inner product y = sum_k C[k]*r[k] with fixed unsigned COEF_W-bit
// coefficients is regrouped by coefficient bit: y = sum_i 2^i * P[i], with
// P[i] = sum of those r[k] whose coefficient has bit i set. The 0/1 matrix of
// coefficient bits (row i = bit plane i, column k = input k) is the DA
// matrix; this block forms one partial sum P[i] per row using adders only.
//
// Redundancy between rows is removed when the array is elaborated: a row
// whose set of inputs contains that of another row starts from that row's
// sum and adds only the inputs that are missing (for the high-pass
// coefficients, P[2] = r1+r2+r3+r4 is built as P[1] + r3, and P[6] = r1 is
// taken straight from P[0]). The base row is the largest such subset that
// has fewer inputs, or as many inputs and a lower row number; this
// greedy reuse rule is this design's own. Rows whose coefficient bits are
// all zero give zero and cost nothing.
//
// A bit plane in which no coefficient has a one gives a constant zero (with
// the high-pass set, planes 3 and 4), and rows with the same inputs give the
// same sum; such outputs are constant or duplicated by design.
//
// Purely combinational. Inputs are two's complement IN_W-bit values,
// outputs P_W-bit two's complement sums that cannot overflow.
module da_adder_array #(
  parameter int NIN    = 4,
  parameter int COEF_W = 7,
  parameter int IN_W   = 9,
  parameter logic [NIN-1:0][COEF_W-1:0] COEFS = {7'd6, 7'd4, 7'd38, 7'd71},
  parameter int P_W    = IN_W + $clog2(NIN)
) (
  input  logic signed [IN_W-1:0] r [NIN],
  output logic signed [P_W-1:0]  p [COEF_W]
);

  // Row i of the DA matrix: which inputs take part in bit plane i.
  function automatic logic [NIN-1:0] row_mask(int i);
    logic [NIN-1:0] m;
    for (int k = 0; k < NIN; k++) m[k] = COEFS[k][i];
    return m;
  endfunction

  function automatic int ones(logic [NIN-1:0] m);
    int n = 0;
    for (int k = 0; k < NIN; k++) n += int'(m[k]);
    return n;
  endfunction

  // Earlier-built row whose inputs are a subset of row i's, or -1.
  function automatic int base_row(int i);
    int best    = -1;
    int best_n  = 0;
    logic [NIN-1:0] mi = row_mask(i);
    for (int j = 0; j < COEF_W; j++) begin
      logic [NIN-1:0] mj = row_mask(j);
      int nj = ones(mj);
      if (j != i && nj > 0 && (mj & ~mi) == '0 &&
          (nj < ones(mi) || (nj == ones(mi) && j < i)) && nj > best_n) begin
        best   = j;
        best_n = nj;
      end
    end
    return best;
  endfunction

  for (genvar i = 0; i < COEF_W; i++) begin : g_row
    localparam int             BASE = base_row(i);
    localparam logic [NIN-1:0] ADD  = (BASE >= 0) ? (row_mask(i) & ~row_mask(BASE))
                                                  : row_mask(i);
    logic signed [P_W-1:0] start;
    logic signed [P_W-1:0] sum;

    if (BASE >= 0) begin : g_reuse
      assign start = p[BASE];
    end else begin : g_fresh
      assign start = '0;
    end

    always_comb begin
      sum = start;
      for (int k = 0; k < NIN; k++)
        if (ADD[k]) sum = sum + P_W'(r[k]);
    end

    assign p[i] = sum;
  end

endmodule
