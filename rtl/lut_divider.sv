// Approximate divider for the gradual mean: quotient = sum / k for k = 1..16.
//
// No real divider is used. For k = 1, 2, 4, 8, 16 the sum is shifted right by
// log2(k). For any other k from 3 to 15 the sum is multiplied by a constant
// factor from a small table (the nearest integer to 256/k: 85, 51, 43, 37, 28,
// 26, 23, 21, 20, 18, 17) and the product is shifted right by 8. The quotient
// is truncated. The factors are within 1 % of 256/k, except for k = 13 and
// 14 (about 1.6 %). The table and the shift
// follow the method; the port widths are this design's choice.
//
// Purely combinational: the quotient is valid in the same cycle as sum and k.
// k = 0 is not a legal input and returns 0.
module lut_divider
  import cmr_pkg::*;
#(
  parameter int unsigned W = SUM_W   // width of the dividend and of the quotient
) (
  input  logic [W-1:0]     sum,
  input  logic [K_W-1:0]   k,
  output logic [W-1:0]     quo
);

  logic [W+7:0] product;
  logic [7:0]   factor;

  always_comb begin
    factor  = div_factor(k);
    product = {8'd0, sum} * {{W{1'b0}}, factor};
    case (k)
      5'd1:    quo = sum;
      5'd2:    quo = sum >> 1;
      5'd4:    quo = sum >> 2;
      5'd8:    quo = sum >> 3;
      5'd16:   quo = sum >> 4;
      5'd0:    quo = '0;
      default: quo = product[W+7:8];
    endcase
  end

endmodule
