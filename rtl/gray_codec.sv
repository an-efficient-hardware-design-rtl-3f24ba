// Offset and Gray-code conversion around the bit-sequential sort.
//
// Before sorting, every signed sample has the group's offset removed so that
// only non-negative integers are sorted, and the result is turned into
// reflected-binary Gray code (G = b xor (b >> 1)). Sorting Gray codes with the
// "zeros top-down, ones bottom-up" rule of the sorter gives ascending binary
// order. After sorting, the Gray code is turned back into binary and the
// offset is added again.
//
// The offset used here is the minimum of the group (subtracted before sorting),
// which makes the values start at zero so that the skipping circuit can drop
// the unused high-order bits; the method only says that an offset is added to
// obtain positive numbers, so the choice of the minimum is this design's own.
//
// Two independent combinational paths: encode (enc_*) and decode (dec_*).
// enc_val must not be below offset.
module gray_codec
  import cmr_pkg::*;
(
  input  logic signed [ADC_W-1:0] offset,     // group minimum
  input  logic signed [ADC_W-1:0] enc_val,    // signed sample
  output logic        [ADC_W-1:0] enc_gray,   // Gray code of (enc_val - offset)
  input  logic        [ADC_W-1:0] dec_gray,   // Gray code from a sort bank
  output logic        [ADC_W-1:0] dec_uval,   // binary value with offset still removed
  output logic signed [ADC_W-1:0] dec_val     // signed sample (offset restored)
);

  logic [ADC_W-1:0] diff;

  always_comb begin
    diff     = ADC_W'(enc_val - offset);
    enc_gray = bin2gray(diff);
    dec_uval = gray2bin(dec_gray);
    dec_val  = ADC_W'(dec_uval + offset);
  end

endmodule
