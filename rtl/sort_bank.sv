// One memory bank (page) of the common-mode unit: DEPTH words of W bits.
//
// Each word holds a strip address and a sample value (see cmr_pkg::cm_word_t).
// The unit uses two such banks and moves the group back and forth between them
// during sorting. One write port (written at the rising clock edge) and one
// asynchronous read port, as a distributed (LUT) RAM of an FPGA provides, so
// that the sorter can read one word and write one word every clock cycle.
// The contents are not reset.
module sort_bank #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned W     = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
