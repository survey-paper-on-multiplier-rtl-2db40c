// tap_pair_adder: the pre-adders of a symmetric FIR filter.
//
// A symmetric filter multiplies two taps by the same coefficient, so the
// taps are added first and each sum is multiplied once. This block holds
// NPAIRS independent two's complement adders, s[k] = a[k] + b[k], each one
// bit wider than its operands so no sum overflows. It is purely
// combinational. The high-pass filter uses 3 of them and the low-pass
// filter 4, as in the published structure.
module tap_pair_adder #(
  parameter int DATA_W = 8,
  parameter int NPAIRS = 3
) (
  input  logic signed [DATA_W-1:0] a [NPAIRS],
  input  logic signed [DATA_W-1:0] b [NPAIRS],
  output logic signed [DATA_W:0]   s [NPAIRS]
);

  for (genvar k = 0; k < NPAIRS; k++) begin : g_pair
    assign s[k] = (DATA_W+1)'(a[k]) + (DATA_W+1)'(b[k]);
  end

endmodule
