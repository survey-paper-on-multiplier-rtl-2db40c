// da_unit: ROM-less, multiplier-less distributed-arithmetic inner product.
//
// Computes y = sum_k COEFS[k] * r[k] for fixed unsigned COEF_W-bit
// coefficients and two's complement inputs without multipliers and without
// a look-up ROM: an adder array (da_adder_array) forms one partial sum per
// coefficient bit plane from the DA matrix, and a shift-and-add chain
// (da_shift_add) weights each non-zero plane by 2^i and accumulates. The
// whole unit is combinational and bit-parallel, so a new input vector can
// be presented every clock; the caller registers the result.
//
// The default coefficients are the scaled high-pass set (71, 38, 4, 6);
// with r = (1, 2, 3, 4) the unit gives 183. The output is the full-precision
// product sum at the coefficient scale (128 times the real-valued filter);
// no rounding or truncation is applied (a design choice).
module da_unit #(
  parameter int NIN    = 4,
  parameter int COEF_W = 7,
  parameter int IN_W   = 9,
  parameter logic [NIN-1:0][COEF_W-1:0] COEFS = {7'd6, 7'd4, 7'd38, 7'd71},
  parameter int OUT_W  = IN_W + $clog2(NIN) + COEF_W
) (
  input  logic signed [IN_W-1:0]  r [NIN],
  output logic signed [OUT_W-1:0] y
);

  localparam int P_W = IN_W + $clog2(NIN);

  // Bit planes with at least one set coefficient bit.
  function automatic logic [COEF_W-1:0] used_rows();
    logic [COEF_W-1:0] u = '0;
    for (int i = 0; i < COEF_W; i++)
      for (int k = 0; k < NIN; k++)
        if (COEFS[k][i]) u[i] = 1'b1;
    return u;
  endfunction

  logic signed [P_W-1:0] p [COEF_W];

  da_adder_array #(
    .NIN(NIN), .COEF_W(COEF_W), .IN_W(IN_W), .COEFS(COEFS), .P_W(P_W)
  ) u_array (
    .r(r), .p(p)
  );

  da_shift_add #(
    .COEF_W(COEF_W), .P_W(P_W), .OUT_W(OUT_W), .ROW_USED(used_rows())
  ) u_shift (
    .p(p), .y(y)
  );

endmodule
