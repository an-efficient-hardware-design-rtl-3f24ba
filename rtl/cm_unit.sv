// Common-mode calculation and subtraction for one group of N adjacent channels.
//
// The unit runs the whole procedure on two N x 16-bit memory banks:
//   LOAD  N pedestal-subtracted samples enter bank 0, each stored with its
//         strip address (arrival order 0..N-1). length_detect tracks the
//         minimum (the offset) and the number of significant bits.
//   SORT  bitsort_ctrl sorts the group by value, one word per clock, in as
//         many passes as the values have significant bits (at most 12).
//   MEAN  the sorted bank is read in ascending order; each Gray code is
//         decoded, the offset-free value feeds cm_select (gradual mean and
//         criterion) and, in the same cycle, the word with its restored signed
//         value is written back into the other bank at its original strip
//         address. The original order is thus recovered while the common mode
//         is computed, at no extra time and without a third memory.
//   OUT   the restored bank is read in strip order and each sample leaves with
//         the common mode subtracted, under a valid/ready handshake.
// The method places the restored list in the first bank; here it goes into
// whichever bank does not hold the sorted list, since writing the bank that is
// being read in sorted order would overwrite words not yet read.
//
// Timing (N = 16): N load cycles, one start cycle, N per sort pass (192 for a
// full 12-bit sort), one cycle, N mean cycles, three cycles to settle the
// common mode and the rms, then N output cycles if out_ready stays high: 245
// cycles for a full group, fewer when the skipping circuit drops passes.
// in_ready is high only in LOAD; a new group can be loaded once the previous
// one has been sent out.
module cm_unit
  import cmr_pkg::*;
#(
  parameter int unsigned N     = N_CH,
  parameter int unsigned TAG_W = 5,
  localparam int unsigned AW   = $clog2(N),
  localparam int unsigned PW   = $clog2(ADC_W + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [7:0]              c1,
  input  logic [7:0]              c2,
  // input samples of one group, in strip order
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [ADC_W-1:0] in_val,
  input  logic [TAG_W-1:0]        in_tag,     // group label, taken from the first sample
  // corrected samples, in strip order
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [AW-1:0]           out_addr,
  output logic signed [OUT_W-1:0] out_val,
  output logic                    out_last,
  output logic [TAG_W-1:0]        out_tag,
  output logic signed [CM_W-1:0]  out_cm,     // common mode of the group
  output logic [SUM_W-1:0]        out_rms,    // rms approximation
  output logic [K_W-1:0]          out_k,      // values averaged into the common mode
  output logic [PW-1:0]           out_npass   // sort passes used
);

  typedef enum logic [2:0] {S_LOAD, S_START, S_SORT, S_MEAN, S_FIN, S_OUT} state_t;
  state_t state;

  logic [AW-1:0]  cnt;
  logic [TAG_W-1:0] tag_q;

  // banks
  logic            b_we   [2];
  logic [AW-1:0]   b_waddr[2];
  cm_word_t        b_wdata[2];
  logic [AW-1:0]   b_raddr[2];
  cm_word_t        b_rdata[2];

  for (genvar b = 0; b < 2; b++) begin : g_bank
    sort_bank #(.DEPTH(N), .W($bits(cm_word_t))) u_bank (
      .clk   (clk),
      .we    (b_we[b]),
      .waddr (b_waddr[b]),
      .wdata (b_wdata[b]),
      .raddr (b_raddr[b]),
      .rdata (b_rdata[b])
    );
  end

  // skipping circuit
  logic signed [ADC_W-1:0] min_val, max_val;
  logic [PW-1:0] npass;
  logic load_fire;
  assign load_fire = (state == S_LOAD) && in_valid;

  length_detect u_len (
    .clk(clk), .rst_n(rst_n), .clr(cnt == '0), .valid(load_fire), .val(in_val),
    .min_val(min_val), .max_val(max_val), .npass(npass)
  );

  // sorter
  logic          s_rd_bank, s_we, s_busy, s_done, s_final;
  logic [AW-1:0] s_raddr, s_waddr;
  cm_word_t      s_wdata;
  logic          final_q;

  bitsort_ctrl #(.N(N)) u_sort (
    .clk(clk), .rst_n(rst_n), .start(state == S_START), .npass(npass), .offset(min_val),
    .rd_bank(s_rd_bank), .raddr(s_raddr), .rdata(b_rdata[s_rd_bank]),
    .we(s_we), .waddr(s_waddr), .wdata(s_wdata),
    .busy(s_busy), .done(s_done), .final_bank(s_final)
  );

  // decoding of the sorted list
  cm_word_t sorted_w;
  logic [ADC_W-1:0] dec_uval, unused_gray;
  logic signed [ADC_W-1:0] dec_val;
  assign sorted_w = b_rdata[final_q];

  gray_codec u_dec (
    .offset(min_val), .enc_val(min_val), .enc_gray(unused_gray),
    .dec_gray(sorted_w.val), .dec_uval(dec_uval), .dec_val(dec_val)
  );

  // common-mode selection
  logic sel_done;
  logic [SUM_W-1:0] cm_u, rms;
  logic [K_W-1:0] k_sel;

  cm_select #(.N(N)) u_sel (
    .clk(clk), .rst_n(rst_n), .start(s_done), .valid(state == S_MEAN),
    .uval(dec_uval), .c1(c1), .c2(c2),
    .done(sel_done), .cm_u(cm_u), .k_sel(k_sel), .rms(rms)
  );

  // bank port multiplexing
  always_comb begin
    for (int b = 0; b < 2; b++) begin
      b_we[b]    = 1'b0;
      b_waddr[b] = cnt;
      b_wdata[b] = '{addr: cnt, val: in_val};
      b_raddr[b] = cnt;
    end
    unique case (state)
      S_LOAD: b_we[0] = in_valid;
      S_SORT: begin
        b_raddr[s_rd_bank]  = s_raddr;
        b_we[!s_rd_bank]    = s_we;
        b_waddr[!s_rd_bank] = s_waddr;
        b_wdata[!s_rd_bank] = s_wdata;
      end
      S_MEAN: begin
        b_we[!final_q]    = 1'b1;
        b_waddr[!final_q] = sorted_w.addr;
        b_wdata[!final_q] = '{addr: sorted_w.addr, val: dec_val};
      end
      default: ;
    endcase
  end

  // output
  cm_word_t out_w;
  assign out_w     = b_rdata[!final_q];
  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_OUT);
  assign out_addr  = out_w.addr;
  assign out_val   = OUT_W'($signed(out_w.val)) - OUT_W'(out_cm);
  assign out_last  = (state == S_OUT) && (cnt == AW'(N - 1));
  assign out_tag   = tag_q;
  assign out_rms   = rms;
  assign out_k     = k_sel;
  assign out_npass = npass;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_LOAD;
      cnt     <= '0;
      tag_q   <= '0;
      final_q <= 1'b0;
      out_cm  <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          if (cnt == '0) tag_q <= in_tag;
          cnt <= cnt + 1'b1;
          if (cnt == AW'(N - 1)) state <= S_START;
        end
        S_START: state <= S_SORT;
        S_SORT: if (s_done) begin
          final_q <= s_final;
          cnt     <= '0;
          state   <= S_MEAN;
        end
        S_MEAN: begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(N - 1)) state <= S_FIN;
        end
        S_FIN: if (sel_done) begin
          out_cm <= CM_W'(cm_u) + CM_W'(min_val);
          state  <= S_OUT;
        end
        S_OUT: if (out_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(N - 1)) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // Output handshake: an offered sample stays unchanged until it is taken.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_val) && $stable(out_addr));

endmodule
