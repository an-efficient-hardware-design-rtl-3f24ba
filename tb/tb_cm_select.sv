// Testbench of cm_select: sorted, offset-free groups (built from a common
// mode, channel noise and a few particle hits) are fed in, and the common
// mode, the number of averaged values k and the rms are compared with the
// reference model. Also checks that done comes three cycles after the last
// value, and that both outcomes of the criterion occur: a jump found (k < 16)
// and no jump (k = 16, mean of all values).
module tb_cm_select;
  import cmr_pkg::*;
  import cm_ref_pkg::*;

  logic clk = 0, rst_n = 0, start, valid, done;
  logic [11:0] uval;
  logic [7:0] c1, c2;
  logic [15:0] cm_u, rms;
  logic [4:0] k_sel;
  int checks = 0, failures = 0, n_jump = 0, n_nojump = 0;

  cm_select dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    vec16_t v, s;
    start = 0; valid = 0; uval = 0; c1 = 3; c2 = 3;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 2000; g++) begin
      int ecm, ek, erms, lat, a, b;
      a = $urandom_range(1, 4); b = $urandom_range(1, 4);
      c1 = 8'(a); c2 = 8'(b);
      v = ref_group($urandom_range(0, 80) - 40, $urandom_range(0, 10), $urandom_range(0, 4),
                    (g % 3 == 0) ? 60 : 2000);
      if (g % 7 == 0) for (int i = 0; i < 16; i++) v[i] = 2047 - 4095 * (i % 2);  // extremes
      s = ref_sort(v);
      ref_cm(v, a, b, ecm, ek, erms);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int i = 0; i < 16; i++) begin
        if ($urandom_range(0, 4) == 0) begin valid = 0; @(negedge clk); end
        valid = 1; uval = 12'(s[i] - s[0]);
        @(negedge clk);
      end
      valid = 0;
      lat = 1;
      while (!done && lat < 10) begin @(negedge clk); lat++; end
      chk(lat == 3, $sformatf("done latency %0d", lat));
      chk(int'(cm_u) + s[0] == ecm, $sformatf("g%0d cm %0d exp %0d", g, int'(cm_u) + s[0], ecm));
      chk(int'(k_sel) == ek, $sformatf("g%0d k %0d exp %0d", g, k_sel, ek));
      chk(int'(rms) == erms, $sformatf("g%0d rms %0d exp %0d", g, rms, erms));
      if (ek < 16) n_jump++; else n_nojump++;
    end
    $display("criterion: jump found %0d, no jump %0d", n_jump, n_nojump);
    chk(n_jump > 0 && n_nojump > 0, "both criterion outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
