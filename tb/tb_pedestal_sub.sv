// Testbench of pedestal_sub: fills the 128-entry pedestal table, then streams
// random raw samples with random input gaps and output back-pressure and
// checks every output (raw - pedestal, clipped to -2048..2047, clip flag,
// tag) in order against a queue of expected values, and the one-cycle latency.
module tb_pedestal_sub;
  logic clk = 0, rst_n = 0;
  logic ped_we = 0;
  logic [6:0] ped_addr = 0, in_chan = 0;
  logic [11:0] ped_data = 0, in_adc = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, out_clip;
  logic [4:0] in_tag = 0, out_tag;
  logic signed [11:0] out_val;
  int checks = 0, failures = 0, n_clip = 0;
  int ped [128];
  int exp_q [$];
  int tag_q [$];
  int lat_in [$];
  int cycle = 0;

  pedestal_sub dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      int e, c;
      e = exp_q.pop_front();
      c = 0;
      if (e > 2047) begin e = 2047; c = 1; end
      if (e < -2048) begin e = -2048; c = 1; end
      checks++;
      if (int'(out_val) != e || out_clip != c || int'(out_tag) != tag_q.pop_front()) begin
        failures++; $display("FAIL out %0d exp %0d clip %0d", out_val, e, out_clip);
      end
      checks++;
      if (cycle - lat_in.pop_front() < 1) begin failures++; $display("FAIL latency"); end
      n_clip += c;
    end
    if (in_valid && in_ready) begin
      exp_q.push_back(int'(in_adc) - ped[in_chan]);
      tag_q.push_back(int'(in_tag));
      lat_in.push_back(cycle);
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      ped_we = 1; ped_addr = 7'(i);
      ped[i] = (i % 16 == 5) ? 4000 : (i % 16 == 6) ? 0 : $urandom_range(100, 3000);
      ped_data = 12'(ped[i]);
    end
    @(negedge clk); ped_we = 0;
    for (int t = 0; t < 5000; t++) begin
      in_valid = 1'($urandom_range(0, 3) != 0);
      in_chan = 7'($urandom);
      in_adc = (t % 50 == 0) ? 12'd4095 : (t % 50 == 1) ? 12'd0 : 12'(ped[in_chan] + $urandom_range(0, 200) - 100);
      in_tag = 5'($urandom);
      out_ready = 1'($urandom_range(0, 3) != 0);
      @(negedge clk);
    end
    in_valid = 0; out_ready = 1;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d samples lost", exp_q.size()); end
    checks++;
    if (n_clip == 0) begin failures++; $display("FAIL clipping never exercised"); end
    $display("clipped samples %0d", n_clip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
