// Testbench of length_detect: random groups of 16 samples with spreads from
// a few counts to the full range; minimum, maximum and the number of passes
// (bits of max - min, at least one) are compared with the reference model.
module tb_length_detect;
  import cm_ref_pkg::*;

  logic clk = 0, rst_n = 0, clr, valid;
  logic signed [11:0] val, min_val, max_val;
  logic [3:0] npass;
  int checks = 0, failures = 0;

  length_detect dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec16_t v;
    clr = 0; valid = 0; val = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 300; g++) begin
      int base, spread, mn, mx;
      spread = 1 << (g % 13);
      base = $urandom_range(0, 4095 - spread + 1) - 2048;
      mn = 99999; mx = -99999;
      for (int i = 0; i < 16; i++) begin
        v[i] = base + $urandom_range(0, spread - 1);
        if (g % 5 == 0) v[i] = base;  // constant group
        if (v[i] < mn) mn = v[i];
        if (v[i] > mx) mx = v[i];
        @(negedge clk);
        clr = (i == 0); valid = 1; val = 12'(v[i]);
        if ($urandom_range(0, 3) == 0) begin valid = 0; @(negedge clk); valid = 1; end
      end
      @(negedge clk);
      valid = 0; clr = 0;
      checks += 3;
      if (int'(min_val) != mn) begin failures++; $display("FAIL min %0d %0d", min_val, mn); end
      if (int'(max_val) != mx) begin failures++; $display("FAIL max %0d %0d", max_val, mx); end
      if (int'(npass) != ref_npass(v)) begin failures++; $display("FAIL npass %0d %0d", npass, ref_npass(v)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
