// Testbench of lut_divider: every k from 1 to 16 against shifts for powers of
// two and the multiply-by-factor-then-shift rule otherwise, over random and
// edge sums; also checks that the approximation stays within 1.6 % (+1 count of
// truncation) of the exact quotient (the factors for 13 and 14 are about
// 1.6 % off, the others below 1 %).
module tb_lut_divider;
  import cm_ref_pkg::*;

  logic [15:0] sum, quo;
  logic [4:0]  k;
  int checks = 0, failures = 0;

  lut_divider dut (.sum(sum), .k(k), .quo(quo));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int kk = 1; kk <= 16; kk++) begin
      for (int t = 0; t < 400; t++) begin
        int s;
        s = (t == 0) ? 0 : (t == 1) ? kk * 4095 : $urandom_range(0, kk * 4095);
        sum = 16'(s); k = 5'(kk);
        #1;
        checks++;
        if (int'(quo) != ref_div(s, kk)) begin
          failures++;
          $display("FAIL k=%0d sum=%0d quo=%0d exp=%0d", kk, s, quo, ref_div(s, kk));
        end
        checks++;
        if ((real'(quo) - real'(s) / kk) > 0.016 * s / kk + 1.0 ||
            (real'(s) / kk - real'(quo)) > 0.016 * s / kk + 1.0) begin
          failures++;
          $display("FAIL accuracy k=%0d sum=%0d quo=%0d", kk, s, quo);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
