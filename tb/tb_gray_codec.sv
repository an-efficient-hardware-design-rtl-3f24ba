// Testbench of gray_codec: the 4-value example (A, 5, 3, C become Gray codes
// F, 7, 2, A), then random offsets and samples, checking the Gray code bit
// by bit against its definition and the round trip back to the sample.
module tb_gray_codec;
  import cmr_pkg::*;

  logic signed [11:0] offset, enc_val, dec_val;
  logic [11:0] enc_gray, dec_gray, dec_uval;
  int checks = 0, failures = 0;

  gray_codec dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int ex_in [4] = '{'hA, 'h5, 'h3, 'hC};
    int ex_g  [4] = '{'hF, 'h7, 'h2, 'hA};
    for (int i = 0; i < 4; i++) begin
      offset = 0; enc_val = 12'(ex_in[i]); dec_gray = 12'(ex_g[i]);
      #1;
      chk(enc_gray == 12'(ex_g[i]), $sformatf("example enc %h -> %h", ex_in[i], enc_gray));
      chk(dec_val == 12'(ex_in[i]), $sformatf("example dec %h -> %h", ex_g[i], dec_val));
    end
    for (int t = 0; t < 3000; t++) begin
      int o, v;
      logic [11:0] d, g;
      o = $urandom_range(0, 4095) - 2048;
      v = $urandom_range(o + 2048, 2047 + 2048) - 2048;
      offset = 12'(o); enc_val = 12'(v);
      #1;
      d = 12'(v - o);
      g = '0;
      for (int b = 0; b < 12; b++) g[b] = d[b] ^ ((b == 11) ? 1'b0 : d[b+1]);
      chk(enc_gray == g, $sformatf("enc off=%0d v=%0d got %h exp %h", o, v, enc_gray, g));
      dec_gray = enc_gray;
      #1;
      chk(dec_uval == d, "dec uval");
      chk(int'(dec_val) == v, $sformatf("dec val %0d exp %0d", dec_val, v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
