// Resolution workload for cm_unit: the Monte Carlo conditions used to judge
// the method, as far as they can be generated here. Each event is a group of
// 16 strips with a common mode drawn from a normal distribution (mean 5, rms
// 10 ADC counts), a strip-to-strip variation of up to +-25 % of it, normal
// channel noise, and 0..3 strips hit by particles with a charge of at least
// one MIP (exponential tail). Two gain settings are run with c1 = c2 = 3:
//   high gain: noise 7 counts, MIP = 50 counts
//   low gain:  noise 3 counts, MIP = 8 counts
// Physics events are replaced by this simple hit model. Every common mode the
// hardware returns is checked against the reference model; the mean and rms
// of (calculated - true common mode) are printed for each setting, and the
// rms must stay below half a MIP.
module tb_cm_resolution;
  import cmr_pkg::*;
  import cm_ref_pkg::*;

  localparam int NEV = 3000;

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

  cm_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000000.0;
    u2 = (real'($urandom_range(0, 999999))) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  task automatic run_gain(input string name, input real sigma, input int mip);
    real sum_d = 0.0, sum_d2 = 0.0, mean, rms;
    for (int e = 0; e < NEV; e++) begin
      vec16_t v;
      real c;
      int ecm, ek, erms, nh;
      c = 5.0 + 10.0 * gauss();
      for (int i = 0; i < 16; i++) begin
        real x;
        x = c * (1.0 + 0.25 * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0)) + sigma * gauss();
        v[i] = $rtoi(x < 0.0 ? x - 0.5 : x + 0.5);
      end
      nh = $urandom_range(0, 3);
      for (int h = 0; h < nh; h++)
        v[$urandom_range(0, 15)] += $rtoi(mip * (1.0 - $ln(real'($urandom_range(1, 1000)) / 1000.0)));
      for (int i = 0; i < 16; i++) if (v[i] > 2047) v[i] = 2047;
      ref_cm(v, 3, 3, ecm, ek, erms);
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        in_valid = 1; in_val = 12'(v[i]);
        while (!in_ready) @(negedge clk);
      end
      @(negedge clk); in_valid = 0;
      while (!out_valid) @(negedge clk);
      checks++;
      if (int'(out_cm) != ecm) begin
        failures++; $display("FAIL %s event %0d cm %0d exp %0d", name, e, out_cm, ecm);
      end
      sum_d  += real'(out_cm) - c;
      sum_d2 += (real'(out_cm) - c) * (real'(out_cm) - c);
      repeat (16) @(negedge clk);
    end
    mean = sum_d / NEV;
    rms  = $sqrt(sum_d2 / NEV - mean * mean);
    $display("%s gain: noise %0.1f, %0d events: calculated - true common mode: mean %0.2f rms %0.2f counts (MIP %0d)",
             name, sigma, NEV, mean, rms, mip);
    checks++;
    if (rms > mip / 2.0) begin failures++; $display("FAIL %s gain resolution", name); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_gain("high", 7.0, 50);
    run_gain("low", 3.0, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
