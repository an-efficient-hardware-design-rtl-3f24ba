// End-to-end testbench of es_cm_frame at its default sizes (6 units, 4
// sensors, 3 time samples: 24 slices of 16 strips per frame).
// Loads a pedestal table, then sends frames of raw samples built from a
// common mode, noise, particle hits and the pedestals, and compares every
// corrected output sample, its slice and strip numbers, and the slice's common
// mode, k and rms with the reference model. The first frame is the longest
// case (every slice spans the full 12 bits, so no sort pass is skipped); it is
// sent at full rate with the output always ready, and its processing time
// (first sample in to last sample out) must stay below one frame readout
// period, 7.5 us, i.e. 1200 cycles of a 160 MHz clock. Later frames add input gaps and output
// back-pressure. Counts and requires: input stalls (all units busy), output
// stalls, clipped pedestal differences, sorts shortened by the skipping
// circuit, full 12-bit sorts, and both outcomes of the common-mode criterion.
module tb_es_cm_frame;
  import cmr_pkg::*;
  import cm_ref_pkg::*;

  localparam int NSL = 24;
  localparam int NFRAMES = 5;

  logic clk = 0, rst_n = 0;
  logic ped_we = 0;
  logic [6:0] ped_addr = 0, in_chan = 0;
  logic [11:0] ped_data = 0, in_adc = 0;
  logic [7:0] c1 = 3, c2 = 3;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, out_last, out_clip;
  logic [4:0] out_slice, out_k;
  logic [3:0] out_strip;
  logic signed [13:0] out_val;
  logic signed [12:0] out_cm;
  logic [15:0] out_rms;
  logic [3:0] out_npass;

  int checks = 0, failures = 0;
  int n_in_stall = 0, n_out_stall = 0, n_clip = 0, n_skip = 0, n_full = 0, n_jump = 0, n_nojump = 0;
  int cycle = 0;
  int ped [128];
  vec16_t exp_v [NFRAMES * NSL];
  int exp_cm [NFRAMES * NSL], exp_k [NFRAMES * NSL], exp_rms [NFRAMES * NSL];
  bit exp_clip [NFRAMES * NSL];
  int t_first, t_last;
  bit noisy_io = 0;

  es_cm_frame dut (.*);

  always #3.125 clk = ~clk;  // 160 MHz
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_in_stall++;
    if (out_valid && !out_ready) n_out_stall++;
  end

  // stimulus
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      ped[i] = $urandom_range(300, 1900);
      ped_we = 1; ped_addr = 7'(i); ped_data = 12'(ped[i]);
    end
    @(negedge clk); ped_we = 0;
    for (int f = 0; f < NFRAMES; f++) begin
      noisy_io = (f > 0);
      for (int s = 0; s < NSL; s++) begin
        int id, sensor, half, raw [16];
        id = f * NSL + s;
        sensor = (s / 2) % 4; half = s % 2;   // slot-major: 8 slices per time sample
        case (id % 4)
          0: exp_v[id] = ref_group($urandom_range(0, 40) - 10, 7, $urandom_range(0, 3), 1500);
          1: exp_v[id] = ref_group($urandom_range(0, 40) - 10, 3, $urandom_range(0, 2), 200);
          2: exp_v[id] = ref_group($urandom_range(0, 40) - 10, 2, 0, 0);
          default: exp_v[id] = ref_group($urandom_range(0, 40) - 10, 7, 1, 2000);
        endcase
        if (f == 0) begin  // longest case: full 12-bit spread in every slice
          exp_v[id][$urandom_range(0, 7)] = 2047;
          exp_v[id][$urandom_range(8, 15)] = -40;
        end
        exp_clip[id] = 0;
        for (int i = 0; i < 16; i++) begin
          int ch;
          ch = sensor * 32 + half * 16 + i;
          raw[i] = exp_v[id][i] + ped[ch];
          if (raw[i] > 4095) raw[i] = 4095;
          if (raw[i] < 0) raw[i] = 0;
          if (id % 17 == 9 && i == 3) raw[i] = (ped[ch] > 2047) ? 0 : 4095;  // clipped difference
          exp_v[id][i] = raw[i] - ped[ch];
          if (exp_v[id][i] > 2047) begin exp_v[id][i] = 2047; exp_clip[id] = 1; end
          if (exp_v[id][i] < -2048) begin exp_v[id][i] = -2048; exp_clip[id] = 1; end
        end
        ref_cm(exp_v[id], 3, 3, exp_cm[id], exp_k[id], exp_rms[id]);
        for (int i = 0; i < 16; i++) begin
          in_valid = 1; in_chan = 7'(sensor * 32 + half * 16 + i); in_adc = 12'(raw[i]);
          if (f == 0 && s == 0 && i == 0) t_first = cycle;
          while (!in_ready) @(negedge clk);
          @(negedge clk);
          if (noisy_io && $urandom_range(0, 7) == 0) begin in_valid = 0; @(negedge clk); end
        end
      end
    end
    in_valid = 0;
  end

  // output checking
  initial begin
    for (int id = 0; id < NFRAMES * NSL; id++) begin
      for (int i = 0; i < 16; i++) begin
        do begin
          @(negedge clk);
          out_ready = noisy_io ? 1'($urandom_range(0, 3) != 0) : 1'b1;
        end while (!(out_valid && out_ready));
        chk(int'(out_slice) == id % NSL, $sformatf("slice %0d exp %0d", out_slice, id % NSL));
        chk(int'(out_strip) == i, "strip");
        chk(int'(out_val) == exp_v[id][i] - exp_cm[id],
            $sformatf("slice %0d strip %0d val %0d exp %0d", id, i, out_val, exp_v[id][i] - exp_cm[id]));
        chk(out_last == (i == 15), "last");
        if (i == 0) begin
          chk(int'(out_cm) == exp_cm[id], $sformatf("slice %0d cm %0d exp %0d", id, out_cm, exp_cm[id]));
          chk(int'(out_k) == exp_k[id], "k");
          chk(int'(out_rms) == exp_rms[id], "rms");
          chk(out_clip == exp_clip[id], "clip flag");
          chk(int'(out_npass) == ref_npass(exp_v[id]), "sort passes");
          if (out_npass < 12) n_skip++; else n_full++;
          n_clip += int'(out_clip);
          if (out_k < 16) n_jump++; else n_nojump++;
        end
        if (id == NSL - 1 && i == 15) t_last = cycle;
      end
    end
    $display("frame 0: %0d cycles (%0d ns at 160 MHz)", t_last - t_first + 1, (t_last - t_first + 1) * 25 / 4);
    chk(t_last - t_first + 1 < 1200, "frame processed within the 7.5 us readout period");
    $display("input stalls %0d, output stalls %0d, clipped slices %0d, shortened sorts %0d, full sorts %0d, jump %0d, no jump %0d",
             n_in_stall, n_out_stall, n_clip, n_skip, n_full, n_jump, n_nojump);
    chk(n_in_stall > 0, "input stall happened");
    chk(n_out_stall > 0, "output stall happened");
    chk(n_clip > 0, "clipping happened");
    chk(n_skip > 0, "shortened sort happened");
    chk(n_full > 0, "full sort happened");
    chk(n_jump > 0 && n_nojump > 0, "both criterion outcomes happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

