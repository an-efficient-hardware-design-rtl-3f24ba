// Online pedestal subtraction of the raw strip samples.
//
// A table holds one 12-bit pedestal (mean base line) per strip served by the
// link: N_CHAN = 4 sensors x 32 strips. Each incoming raw ADC sample, tagged
// with its strip number, leaves with its strip's pedestal subtracted. The
// difference is kept as a 12-bit two's-complement value, the width the
// common-mode memory words provide; differences outside -2048..2047 are
// clipped and flagged (the clipping is this design's choice). The table is
// written through a simple write port; it has no reset, so every entry used
// must be written first.
//
// Timing: one register stage with a valid/ready handshake; a sample accepted
// in cycle t appears at the output in cycle t+1.
module pedestal_sub
  import cmr_pkg::*;
#(
  parameter int unsigned N_CHAN = 128,
  parameter int unsigned TAG_W  = 5,
  localparam int unsigned CW    = $clog2(N_CHAN)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // pedestal table
  input  logic                    ped_we,
  input  logic [CW-1:0]           ped_addr,
  input  logic [ADC_W-1:0]        ped_data,
  // raw samples
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [CW-1:0]           in_chan,
  input  logic [ADC_W-1:0]        in_adc,
  input  logic [TAG_W-1:0]        in_tag,
  // pedestal-subtracted samples
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [ADC_W-1:0] out_val,
  output logic [TAG_W-1:0]        out_tag,
  output logic                    out_clip
);

  localparam logic signed [ADC_W:0] MAXV = (ADC_W+1)'(2**(ADC_W-1) - 1);
  localparam logic signed [ADC_W:0] MINV = -(ADC_W+1)'(2**(ADC_W-1));

  logic [ADC_W-1:0] ped [N_CHAN];
  logic signed [ADC_W:0] diff;

  always_ff @(posedge clk) begin
    if (ped_we) ped[ped_addr] <= ped_data;
  end

  assign in_ready = !out_valid || out_ready;
  assign diff     = $signed({1'b0, in_adc}) - $signed({1'b0, ped[in_chan]});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_val   <= '0;
      out_tag   <= '0;
      out_clip  <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_tag  <= in_tag;
        out_clip <= (diff > MAXV) || (diff < MINV);
        if (diff > MAXV)      out_val <= MAXV[ADC_W-1:0];
        else if (diff < MINV) out_val <= MINV[ADC_W-1:0];
        else                  out_val <= diff[ADC_W-1:0];
      end
    end
  end

  // Output handshake: an offered sample stays unchanged until it is taken.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_val) && $stable(out_tag));

endmodule
