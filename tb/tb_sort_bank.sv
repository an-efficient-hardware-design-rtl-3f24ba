// Testbench of sort_bank: random writes checked against a shadow array
// through the asynchronous read port, including a read of the address being
// written in the same cycle (old contents until the clock edge).
module tb_sort_bank;
  logic clk = 0;
  logic we;
  logic [3:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] shadow [16];
  int checks = 0, failures = 0;

  sort_bank dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); we = 1; waddr = 4'(i); wdata = 16'($urandom); shadow[i] = wdata;
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 4'($urandom); wdata = 16'($urandom); raddr = 4'($urandom);
      #1;
      checks++;
      if (rdata != shadow[raddr]) begin failures++; $display("FAIL read %0d", raddr); end
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
