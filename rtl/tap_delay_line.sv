// tap_delay_line: the sample delay line of the filter pair.
//
// A chain of DEPTH registers. When `en` is high the input sample Y(n) is
// taken into the first register and every register passes its value to the
// next, so that after the clock edge taps[k] holds Y(n-1-k) relative to the
// next sample. With the default DEPTH of 8 the outputs are Y(n-1) .. Y(n-8),
// the eight delay elements of the filter pair. `en` low holds the line.
// Reset is asynchronous, active low, and clears every tap to zero, which
// stands for zero samples before the start of a signal (a design choice).
module tap_delay_line #(
  parameter int DATA_W = 8,
  parameter int DEPTH  = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [DATA_W-1:0] din,
  output logic signed [DATA_W-1:0] taps [DEPTH]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) taps[k] <= '0;
    end else if (en) begin
      taps[0] <= din;
      for (int k = 1; k < DEPTH; k++) taps[k] <= taps[k-1];
    end
  end

endmodule
