// Testbench of bitsort_ctrl with two sort_bank memories around it.
// Loads bank 0 with a group, starts the sort with the pass count of the
// reference model and checks: the cycle count (N per pass), the bank holding
// the result (odd/even number of passes), ascending order of the decoded
// values, and that every strip address is still present once with its value.
// Also runs the 4-value example (A, 5, 3, C sort to Gray codes 2, 7, F, A).
module tb_bitsort_ctrl;
  import cmr_pkg::*;
  import cm_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- N = 16 instance ----------------
  logic start, rd_bank, we, busy, done, final_bank;
  logic [3:0] npass, raddr, waddr;
  logic signed [11:0] offset;
  cm_word_t rdata, wdata;
  logic tb_we; logic [3:0] tb_addr; cm_word_t tb_data;
  logic we0, we1; logic [3:0] wa0, wa1, ra0, ra1; cm_word_t wd0, wd1, rd0, rd1;

  bitsort_ctrl #(.N(16)) dut (.*);

  always_comb begin
    we0 = tb_we ? 1'b1 : (we && rd_bank);
    we1 = tb_we ? 1'b0 : (we && !rd_bank);
    wa0 = tb_we ? tb_addr : waddr;  wa1 = waddr;
    wd0 = tb_we ? tb_data : wdata;  wd1 = wdata;
    ra0 = busy ? raddr : tb_addr;   ra1 = busy ? raddr : tb_addr;
    rdata = rd_bank ? rd1 : rd0;
  end
  sort_bank b0 (.clk(clk), .we(we0), .waddr(wa0), .wdata(wd0), .raddr(ra0), .rdata(rd0));
  sort_bank b1 (.clk(clk), .we(we1), .waddr(wa1), .wdata(wd1), .raddr(ra1), .rdata(rd1));

  // ---------------- N = 4 instance for the example ----------------
  logic s4_start, s4_rd_bank, s4_we, s4_busy, s4_done, s4_final;
  logic [1:0] s4_raddr, s4_waddr, t4_addr;
  cm_word_t s4_rdata, s4_wdata, t4_data, r40, r41;
  logic t4_we;
  bitsort_ctrl #(.N(4)) dut4 (.clk(clk), .rst_n(rst_n), .start(s4_start), .npass(4'd4), .offset(12'sd0),
    .rd_bank(s4_rd_bank), .raddr(s4_raddr), .rdata(s4_rdata), .we(s4_we), .waddr(s4_waddr), .wdata(s4_wdata),
    .busy(s4_busy), .done(s4_done), .final_bank(s4_final));
  sort_bank #(.DEPTH(4)) c0 (.clk(clk), .we(t4_we | (s4_we & s4_rd_bank)), .waddr(t4_we ? t4_addr : s4_waddr),
    .wdata(t4_we ? t4_data : s4_wdata), .raddr(s4_busy ? s4_raddr : t4_addr), .rdata(r40));
  sort_bank #(.DEPTH(4)) c1 (.clk(clk), .we(!t4_we & s4_we & !s4_rd_bank), .waddr(s4_waddr),
    .wdata(s4_wdata), .raddr(s4_busy ? s4_raddr : t4_addr), .rdata(r41));
  assign s4_rdata = s4_rd_bank ? r41 : r40;

  initial begin
    vec16_t v, s;
    int ex_in [4] = '{'hA, 'h5, 'h3, 'hC};
    int ex_g  [4] = '{'h2, 'h7, 'hF, 'hA};
    start = 0; npass = 1; offset = 0; tb_we = 0; tb_addr = 0; tb_data = '0;
    s4_start = 0; t4_we = 0; t4_addr = 0; t4_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // example of four 4-bit numbers
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); t4_we = 1; t4_addr = 2'(i); t4_data = '{addr: 4'(i), val: 12'(ex_in[i])};
    end
    @(negedge clk); t4_we = 0; s4_start = 1;
    @(negedge clk); s4_start = 0;
    while (!s4_done) @(negedge clk);
    chk(s4_final == 1'b0, "example ends in bank 0");
    for (int i = 0; i < 4; i++) begin
      t4_addr = 2'(i); #1;
      chk(r40.val == 12'(ex_g[i]), $sformatf("example pos %0d gray %h exp %h", i, r40.val, ex_g[i]));
    end

    for (int g = 0; g < 200; g++) begin
      int np, cyc, spread, base, off;
      bit seen [16];
      spread = (g < 24) ? (1 << (g % 12)) : (1 << $urandom_range(0, 12));
      if (spread > 4096) spread = 4096;
      base = $urandom_range(0, 4096 - spread) - 2048;
      for (int i = 0; i < 16; i++) v[i] = base + $urandom_range(0, spread - 1);
      s = ref_sort(v); np = ref_npass(v); off = s[0];
      for (int i = 0; i < 16; i++) begin
        @(negedge clk); tb_we = 1; tb_addr = 4'(i); tb_data = '{addr: 4'(i), val: 12'(v[i])};
      end
      @(negedge clk); tb_we = 0; start = 1; npass = 4'(np); offset = 12'(off);
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      chk(cyc == 16 * np + 1, $sformatf("cycles %0d for %0d passes", cyc, np));
      chk(final_bank == 1'(np % 2), "final bank parity");
      for (int i = 0; i < 16; i++) seen[i] = 0;
      for (int i = 0; i < 16; i++) begin
        cm_word_t w;
        tb_addr = 4'(i); #1;
        w = final_bank ? rd1 : rd0;
        chk(int'(gray2bin(w.val)) + off == s[i], $sformatf("g%0d pos %0d value %0d exp %0d", g, i, int'(gray2bin(w.val)) + off, s[i]));
        chk(v[w.addr] == s[i] && !seen[w.addr], "address travels with its value");
        seen[w.addr] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
