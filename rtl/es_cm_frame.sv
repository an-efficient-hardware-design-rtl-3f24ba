// Common-mode rejection stage for the data of one optical link of the
// Preshower readout: up to N_SENSORS sensors of 32 strips, N_SLOTS time
// samples each, i.e. N_SLOTS * N_SENSORS * 2 groups ("slices") of 16
// adjacent strips per frame (24 with the default sizes).
//
// Raw samples arrive already unpacked, one per clock, slice after slice (16
// consecutive samples form one slice), each tagged with its strip number
// 0..N_SENSORS*32-1. pedestal_sub removes the pedestal. Whole slices are handed
// round-robin to N_UNITS common-mode units working in parallel, and the
// corrected slices are collected from the units in the same round-robin order,
// so they leave in the order they came in. Each output word carries the slice
// number inside the frame, the strip within the slice, the corrected value,
// the common mode, its rms and k of its slice, and how many sort passes the
// slice needed. When all units are busy the input is held off (in_ready low);
// when out_ready is low the units wait.
//
// Six units and the per-frame sizes follow the readout described for the
// Preshower; the in-order round-robin dispatch and collection are this
// design's own choice. With one sample per clock in and out_ready high, a full
// frame of 24 slices that all need the full 12 sort passes takes about 1100
// cycles from the first sample in to the last sample out: 6.9 us at 160 MHz,
// inside the 7.5 us frame readout period. A unit needs 53 + 16 * passes cycles
// per slice, so frames of small signals go faster.
module es_cm_frame
  import cmr_pkg::*;
#(
  parameter int unsigned N_UNITS   = 6,
  parameter int unsigned N_SENSORS = 4,
  parameter int unsigned N_SLOTS   = 3,
  localparam int unsigned N_CHAN   = N_SENSORS * 32,
  localparam int unsigned CW       = $clog2(N_CHAN),
  localparam int unsigned N_SLICES = N_SLOTS * N_SENSORS * 2,
  localparam int unsigned TAG_W    = $clog2(N_SLICES),
  localparam int unsigned UW       = (N_UNITS > 1) ? $clog2(N_UNITS) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration
  input  logic                    ped_we,
  input  logic [CW-1:0]           ped_addr,
  input  logic [ADC_W-1:0]        ped_data,
  input  logic [7:0]              c1,
  input  logic [7:0]              c2,
  // unpacked raw samples
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [CW-1:0]           in_chan,
  input  logic [ADC_W-1:0]        in_adc,
  // corrected samples
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [TAG_W-1:0]        out_slice,
  output logic [ADDR_W-1:0]       out_strip,
  output logic signed [OUT_W-1:0] out_val,
  output logic                    out_last,
  output logic signed [CM_W-1:0]  out_cm,
  output logic [SUM_W-1:0]        out_rms,
  output logic [K_W-1:0]          out_k,
  output logic [$clog2(ADC_W+1)-1:0] out_npass, // sort passes the slice needed
  output logic                    out_clip     // a pedestal difference was clipped
);

  // slice numbering of the input
  logic [ADDR_W-1:0] in_word;
  logic [TAG_W-1:0]  in_slice;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_word  <= '0;
      in_slice <= '0;
    end else if (in_valid && in_ready) begin
      in_word <= in_word + 1'b1;
      if (in_word == ADDR_W'(N_CH - 1))
        in_slice <= (in_slice == TAG_W'(N_SLICES - 1)) ? '0 : in_slice + 1'b1;
    end
  end

  // pedestal subtraction
  logic                    p_valid, p_ready, p_clip;
  logic signed [ADC_W-1:0] p_val;
  logic [TAG_W-1:0]        p_tag;

  pedestal_sub #(.N_CHAN(N_CHAN), .TAG_W(TAG_W)) u_ped (
    .clk(clk), .rst_n(rst_n),
    .ped_we(ped_we), .ped_addr(ped_addr), .ped_data(ped_data),
    .in_valid(in_valid), .in_ready(in_ready), .in_chan(in_chan), .in_adc(in_adc), .in_tag(in_slice),
    .out_valid(p_valid), .out_ready(p_ready), .out_val(p_val), .out_tag(p_tag), .out_clip(p_clip)
  );

  // clip flags per unit, carried with the slice
  logic [N_UNITS-1:0] clip_q;

  // dispatch
  logic [UW-1:0]      wr_ptr, rd_ptr;
  logic [ADDR_W-1:0]  disp_word;
  logic [N_UNITS-1:0] u_in_ready, u_out_valid, u_out_last;

  logic [ADDR_W-1:0]       u_addr [N_UNITS];
  logic signed [OUT_W-1:0] u_val  [N_UNITS];
  logic [TAG_W-1:0]        u_tag  [N_UNITS];
  logic signed [CM_W-1:0]  u_cm   [N_UNITS];
  logic [SUM_W-1:0]        u_rms  [N_UNITS];
  logic [K_W-1:0]          u_k    [N_UNITS];
  logic [$clog2(ADC_W+1)-1:0] u_npass [N_UNITS];

  assign p_ready = u_in_ready[wr_ptr];

  for (genvar u = 0; u < N_UNITS; u++) begin : g_unit
    cm_unit #(.N(N_CH), .TAG_W(TAG_W)) u_cm_unit (
      .clk(clk), .rst_n(rst_n), .c1(c1), .c2(c2),
      .in_valid(p_valid && wr_ptr == UW'(u)), .in_ready(u_in_ready[u]),
      .in_val(p_val), .in_tag(p_tag),
      .out_valid(u_out_valid[u]), .out_ready(out_ready && rd_ptr == UW'(u)),
      .out_addr(u_addr[u]), .out_val(u_val[u]), .out_last(u_out_last[u]), .out_tag(u_tag[u]),
      .out_cm(u_cm[u]), .out_rms(u_rms[u]), .out_k(u_k[u]), .out_npass(u_npass[u])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      disp_word <= '0;
      clip_q    <= '0;
    end else begin
      if (p_valid && p_ready) begin
        disp_word <= disp_word + 1'b1;
        if (disp_word == '0) clip_q[wr_ptr] <= p_clip;
        else if (p_clip)     clip_q[wr_ptr] <= 1'b1;
        if (disp_word == ADDR_W'(N_CH - 1))
          wr_ptr <= (wr_ptr == UW'(N_UNITS - 1)) ? '0 : wr_ptr + 1'b1;
      end
      if (out_valid && out_ready && out_last)
        rd_ptr <= (rd_ptr == UW'(N_UNITS - 1)) ? '0 : rd_ptr + 1'b1;
    end
  end

  // in-order collection
  assign out_valid = u_out_valid[rd_ptr];
  assign out_last  = u_out_last[rd_ptr];
  assign out_slice = u_tag[rd_ptr];
  assign out_strip = u_addr[rd_ptr];
  assign out_val   = u_val[rd_ptr];
  assign out_cm    = u_cm[rd_ptr];
  assign out_rms   = u_rms[rd_ptr];
  assign out_k     = u_k[rd_ptr];
  assign out_npass = u_npass[rd_ptr];
  assign out_clip  = clip_q[rd_ptr];

endmodule
