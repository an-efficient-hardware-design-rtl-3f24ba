// Controller of the bit-sequential sort over two memory banks.
//
// The group starts in bank 0 (raw signed samples). For pass j = 0, 1, ...,
// npass-1 the controller reads the N words of the source bank in order, one per
// clock. A word whose Gray-coded value has bit j equal to 0 is written into the
// other bank from the top (address 0 upwards); a word with bit j equal to 1 is
// written from the bottom (address N-1 downwards). Source and destination then
// swap. Because the values are Gray codes, the reversal of the "ones" part in
// each pass is exactly what is needed: after the last pass the destination
// bank holds the words in ascending order of their binary value. During pass 0
// the raw value is converted on the fly (offset removed, Gray encoded), so the
// sorted bank holds Gray codes of the offset values; addresses travel along.
//
// Timing: N * npass clock cycles from the cycle after start to done (192 for
// N = 16 and 12 passes). done is a one-cycle pulse in the cycle after the last
// write; final_bank then tells which bank holds the sorted list (1 for an odd
// number of passes, 0 for an even one). Following the method, a full 12-bit
// sort ends in bank 0; the skipping circuit may request fewer passes.
module bitsort_ctrl
  import cmr_pkg::*;
#(
  parameter int unsigned N = N_CH,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned PW = $clog2(ADC_W + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [PW-1:0]           npass,      // 1..ADC_W
  input  logic signed [ADC_W-1:0] offset,     // value subtracted before encoding
  // bank access
  output logic                    rd_bank,    // bank read this cycle
  output logic [AW-1:0]           raddr,
  input  cm_word_t                rdata,      // word read from bank rd_bank
  output logic                    we,         // write into bank !rd_bank
  output logic [AW-1:0]           waddr,
  output cm_word_t                wdata,
  // status
  output logic                    busy,
  output logic                    done,
  output logic                    final_bank
);

  logic [AW-1:0] idx, top, bot;
  logic [PW-1:0] pass;
  logic [PW-1:0] npass_q;
  logic [ADC_W-1:0] enc_gray, gval;
  logic [ADC_W-1:0] unused_uval;
  logic signed [ADC_W-1:0] unused_val;
  logic bitj;

  gray_codec u_enc (
    .offset   (offset),
    .enc_val  (rdata.val),
    .enc_gray (enc_gray),
    .dec_gray ('0),
    .dec_uval (unused_uval),
    .dec_val  (unused_val)
  );

  always_comb begin
    gval       = (pass == '0) ? enc_gray : rdata.val;
    bitj       = gval[pass];
    raddr      = idx;
    we         = busy;
    waddr      = bitj ? bot : top;
    wdata.addr = rdata.addr;
    wdata.val  = gval;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      idx        <= '0;
      top        <= '0;
      bot        <= AW'(N - 1);
      pass       <= '0;
      npass_q    <= PW'(1);
      rd_bank    <= 1'b0;
      final_bank <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy    <= 1'b1;
        idx     <= '0;
        top     <= '0;
        bot     <= AW'(N - 1);
        pass    <= '0;
        npass_q <= (npass == '0) ? PW'(1) : npass;
        rd_bank <= 1'b0;
      end else if (busy) begin
        if (bitj) bot <= bot - 1'b1;
        else      top <= top + 1'b1;
        idx <= idx + 1'b1;
        if (idx == AW'(N - 1)) begin
          idx     <= '0;
          top     <= '0;
          bot     <= AW'(N - 1);
          rd_bank <= ~rd_bank;
          pass    <= pass + 1'b1;
          if (pass + 1'b1 == npass_q) begin
            busy       <= 1'b0;
            done       <= 1'b1;
            final_bank <= ~rd_bank;
          end
        end
      end
    end
  end

  // The two fill pointers never cross: every word of a pass has a free slot.
  a_fill_ptrs: assert property (@(posedge clk) disable iff (!rst_n) busy |-> top <= bot);

endmodule
