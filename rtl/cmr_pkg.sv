// Shared constants, types and helper functions of the common-mode rejection
// datapath for a group of 16 adjacent silicon-strip channels.
//
// A group ("slice") holds 16 pedestal-subtracted 12-bit samples. Inside a
// common-mode unit each sample is kept in a 16-bit memory word: the 4-bit strip
// address next to the 12-bit value, so that the original strip order can be
// restored after sorting. The functions below are the pure combinational parts
// of the method: binary/Gray conversion (used by the bit-sequential sort) and
// the multiplying factors that replace division by 3..15 (the factor is the
// nearest integer to 256/k, followed by a right shift of 8 bits).
package cmr_pkg;

  localparam int unsigned N_CH    = 16;   // channels per group
  localparam int unsigned ADDR_W  = 4;    // strip address inside a group
  localparam int unsigned ADC_W   = 12;   // sample width after pedestal subtraction
  localparam int unsigned K_W     = 5;    // holds k = 1..16
  localparam int unsigned SUM_W   = ADC_W + ADDR_W;  // sum of 16 offset values
  localparam int unsigned OUT_W   = ADC_W + 2;       // corrected sample width
  localparam int unsigned CM_W    = ADC_W + 1;       // signed common mode

  // One memory word of a sort bank: strip address and 12-bit value.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [ADC_W-1:0]  val;
  } cm_word_t;

  // Binary to reflected-binary Gray code.
  function automatic logic [ADC_W-1:0] bin2gray(input logic [ADC_W-1:0] b);
    return b ^ (b >> 1);
  endfunction

  // Reflected-binary Gray code back to binary: b[i] = b[i+1] ^ g[i].
  function automatic logic [ADC_W-1:0] gray2bin(input logic [ADC_W-1:0] g);
    logic [ADC_W-1:0] b;
    b[ADC_W-1] = g[ADC_W-1];
    for (int i = ADC_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // Multiplying factor replacing division by k (k not a power of two),
  // applied as (x * factor) >> 8. Zero for powers of two, which shift instead.
  function automatic logic [7:0] div_factor(input logic [K_W-1:0] k);
    case (k)
      5'd3:  return 8'd85;
      5'd5:  return 8'd51;
      5'd6:  return 8'd43;
      5'd7:  return 8'd37;
      5'd9:  return 8'd28;
      5'd10: return 8'd26;
      5'd11: return 8'd23;
      5'd12: return 8'd21;
      5'd13: return 8'd20;
      5'd14: return 8'd18;
      5'd15: return 8'd17;
      default: return 8'd0;
    endcase
  endfunction

endpackage
