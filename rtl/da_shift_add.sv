// da_shift_add: the shift-and-add stage of a distributed-arithmetic unit.
//
// Combines the bit-plane partial sums of the adder array into the inner
// product y = sum_i 2^i * P[i]. Only the planes flagged in ROW_USED (planes
// whose coefficient bits are not all zero) are routed to the chain: the
// first used plane starts the running sum Yp(0) and each further used plane
// is added with its weight, Yp(k) = Yp(k-1) + 2^i * P[i], so an all-zero
// plane costs no adder. With the high-pass coefficients the planes 0,1,2,5,6
// are used and the chain has four adders. The chain is bit-parallel and
// combinational: one result per evaluation, no internal state.
module da_shift_add #(
  parameter int COEF_W = 7,
  parameter int P_W    = 11,
  parameter int OUT_W  = P_W + COEF_W,
  parameter logic [COEF_W-1:0] ROW_USED = 7'b110_0111
) (
  input  logic signed [P_W-1:0]   p [COEF_W],
  output logic signed [OUT_W-1:0] y
);

  // stage[i] is the running sum after planes 0..i have been considered.
  logic signed [OUT_W-1:0] stage [COEF_W];

  for (genvar i = 0; i < COEF_W; i++) begin : g_plane
    if (i == 0) begin : g_first
      if (ROW_USED[0]) begin : g_use
        assign stage[0] = OUT_W'(p[0]);
      end else begin : g_skip
        assign stage[0] = '0;
      end
    end else begin : g_next
      if (ROW_USED[i]) begin : g_use
        assign stage[i] = stage[i-1] + (OUT_W'(p[i]) <<< i);
      end else begin : g_skip
        assign stage[i] = stage[i-1];
      end
    end
  end

  assign y = stage[COEF_W-1];

endmodule
