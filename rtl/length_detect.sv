// Skipping circuit: finds how many sort passes a group needs.
//
// While the 16 samples of a group are written into the first bank, the running
// minimum and maximum are kept. The minimum is the offset removed before
// sorting; the number of significant bits of (maximum - minimum) is the
// "actual length" of the values, and the bit-sequential sort needs only that
// many passes instead of 12. At least one pass is always made, so that the
// sorted data always carry Gray codes. Finding the length from the spread of
// the group is this design's reading of the skipping circuit, whose insides
// the method does not give.
//
// Interface: clr starts a new group (takes effect at the next edge, the sample
// presented together with clr is the first of the new group); valid/val add a
// sample. min_val, max_val and npass are valid from the cycle after the last
// sample and hold until the next clr.
module length_detect
  import cmr_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    valid,
  input  logic signed [ADC_W-1:0] val,
  output logic signed [ADC_W-1:0] min_val,
  output logic signed [ADC_W-1:0] max_val,
  output logic [$clog2(ADC_W+1)-1:0] npass
);

  logic [ADC_W-1:0] spread;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min_val <= '0;
      max_val <= '0;
    end else if (valid) begin
      min_val <= (clr || val < min_val) ? val : min_val;
      max_val <= (clr || val > max_val) ? val : max_val;
    end
  end

  always_comb begin
    spread = ADC_W'(max_val - min_val);
    npass  = 1;
    for (int i = 1; i < ADC_W; i++)
      if (spread[i]) npass = ($clog2(ADC_W+1))'(i + 1);
  end

endmodule
