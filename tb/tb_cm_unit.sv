// Testbench of cm_unit: groups with a common mode, channel noise and particle
// hits of different sizes go in; every corrected sample is compared with the
// reference model (sample - common mode, in strip order), together with the
// common mode, k, rms, the number of sort passes and the group tag.
// With continuous input and output the time from the first accepted sample to
// the last output sample must be 53 + 16 * passes cycles (245 for a full
// 12-bit sort). Counts and requires: groups whose sort was shortened by the
// skipping circuit, full 12-pass sorts, odd pass counts (result in the second
// bank), and output back-pressure.
module tb_cm_unit;
  import cmr_pkg::*;
  import cm_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0] c1 = 3, c2 = 3;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, out_last;
  logic signed [11:0] in_val = 0;
  logic [4:0] in_tag = 0, out_tag, out_k;
  logic [3:0] out_addr, out_npass;
  logic signed [13:0] out_val;
  logic signed [12:0] out_cm;
  logic [15:0] out_rms;
  int checks = 0, failures = 0;
  int n_skip = 0, n_full = 0, n_odd = 0, n_stall = 0;
  int cycle = 0;

  cm_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    vec16_t v;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 400; g++) begin
      int ecm, ek, erms, np, t0, t1;
      bit smooth;
      smooth = (g % 4 != 3);   // every 4th group: random gaps and back-pressure
      case (g % 5)
        0: v = ref_group($urandom_range(0, 60) - 30, 7, $urandom_range(0, 3), 1500);
        1: v = ref_group($urandom_range(0, 60) - 30, 3, $urandom_range(0, 3), 60);
        2: v = ref_group($urandom_range(0, 60) - 30, 1, 0, 0);
        3: v = ref_group($urandom_range(0, 3000) - 1500, 10, $urandom_range(0, 5), 400);
        default: for (int i = 0; i < 16; i++) v[i] = $urandom_range(0, 4095) - 2048;
      endcase
      ref_cm(v, 3, 3, ecm, ek, erms);
      np = ref_npass(v);
      // load
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        while (!smooth && $urandom_range(0, 2) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_val = 12'(v[i]); in_tag = 5'(g);
        chk(in_ready, "in_ready during load");
        if (i == 0) t0 = cycle;
      end
      @(negedge clk); in_valid = 0;
      // unload
      for (int i = 0; i < 16; i++) begin
        out_ready = smooth ? 1'b1 : 1'($urandom_range(0, 1));
        while (!(out_valid && out_ready)) begin
          @(negedge clk);
          if (out_valid && !out_ready) n_stall++;
          out_ready = smooth ? 1'b1 : 1'($urandom_range(0, 1));
        end
        chk(int'(out_addr) == i, $sformatf("g%0d addr %0d exp %0d", g, out_addr, i));
        chk(int'(out_val) == v[i] - ecm, $sformatf("g%0d strip %0d val %0d exp %0d", g, i, out_val, v[i] - ecm));
        chk(out_last == (i == 15), "last flag");
        if (i == 0) begin
          chk(int'(out_cm) == ecm, $sformatf("g%0d cm %0d exp %0d", g, out_cm, ecm));
          chk(int'(out_k) == ek, $sformatf("g%0d k %0d exp %0d", g, out_k, ek));
          chk(int'(out_rms) == erms, $sformatf("g%0d rms %0d exp %0d", g, out_rms, erms));
          chk(int'(out_npass) == np, $sformatf("g%0d npass %0d exp %0d", g, out_npass, np));
          chk(out_tag == 5'(g), "tag");
        end
        t1 = cycle;
        @(negedge clk);
      end
      out_ready = 1;
      if (smooth) chk(t1 - t0 + 1 == 53 + 16 * np, $sformatf("g%0d latency %0d exp %0d", g, t1 - t0 + 1, 53 + 16 * np));
      if (np < 12) n_skip++; else n_full++;
      if (np % 2 == 1) n_odd++;
    end
    $display("skipped passes %0d, full sorts %0d, odd pass counts %0d, output stalls %0d",
             n_skip, n_full, n_odd, n_stall);
    chk(n_skip > 0 && n_full > 0 && n_odd > 0 && n_stall > 0, "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
