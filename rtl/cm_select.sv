// Gradual mean, selection criterion and rms of the common mode.
//
// The N sorted (ascending) values of a group enter one per valid cycle, with
// the group offset already removed, so they are non-negative. For each k the
// running sum S_k gives the gradual mean m_k = S_k / k, formed by the
// table-based lut_divider. The common mode is m_k for the first k (from k = 1)
// for which
//     m_k - m_(k-1) <  c1   and   m_(k+1) - m_k >= c2,
// i.e. the mean is still smooth up to k but jumps when the next value, the
// smallest one carrying particle charge, is added. For k = 1 the first
// condition holds by definition (m_0 is taken equal to m_1). When no jump is
// found the common mode is the mean of all N values, m_N. The condition on
// m_(k+1) is evaluated when value k+1 arrives, so the unit needs no look-ahead.
// The rms of the common mode is approximated as (m_k - m_1) * 4 / k, using a
// second lut_divider. Reading the jump condition as ">= c2", m_0 = m_1 and the
// rms formula are this design's readings of the method.
//
// Timing: start clears the unit (one cycle). The N values follow, one per
// valid cycle (gaps allowed). done is high in the third cycle after the one
// carrying the N-th value;
// cm_u, k_sel and rms then hold until the next start.
module cm_select
  import cmr_pkg::*;
#(
  parameter int unsigned N = N_CH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              valid,
  input  logic [ADC_W-1:0]  uval,     // sorted value, offset removed
  input  logic [7:0]        c1,
  input  logic [7:0]        c2,
  output logic              done,
  output logic [SUM_W-1:0]  cm_u,     // common mode, offset removed
  output logic [K_W-1:0]    k_sel,    // number of values averaged
  output logic [SUM_W-1:0]  rms
);

  typedef enum logic [1:0] {S_IDLE, S_ACC, S_FIX, S_RMS} state_t;
  state_t state;

  logic [SUM_W-1:0] sum, sum_next, m_new, m1, m_prev, m_prev2;
  logic [K_W-1:0]   cnt, k_next;
  logic             found;
  logic signed [SUM_W+1:0] d1, d2;
  logic             crit;
  logic [SUM_W-1:0] spread4, rms_q;

  always_comb begin
    sum_next = sum + SUM_W'(uval);
    k_next   = cnt + 1'b1;
    // criterion for k = cnt (the previous value), using m_(k+1) = m_new
    d1   = (cnt == K_W'(1)) ? '0 : $signed({2'b00, m_prev}) - $signed({2'b00, m_prev2});
    d2   = $signed({2'b00, m_new}) - $signed({2'b00, m_prev});
    crit = (cnt != '0) && (d1 < $signed({10'd0, c1})) && (d2 >= $signed({10'd0, c2}));
    spread4 = (cm_u > m1) ? SUM_W'((cm_u - m1) << 2) : '0;
  end

  lut_divider #(.W(SUM_W)) u_mean (.sum(sum_next), .k(k_next), .quo(m_new));
  lut_divider #(.W(SUM_W)) u_rms  (.sum(spread4),  .k(k_sel),  .quo(rms_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      sum     <= '0;
      cnt     <= '0;
      m1      <= '0;
      m_prev  <= '0;
      m_prev2 <= '0;
      found   <= 1'b0;
      cm_u    <= '0;
      k_sel   <= '0;
      rms     <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        state <= S_ACC;
        sum   <= '0;
        cnt   <= '0;
        found <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_ACC: if (valid) begin
            sum     <= sum_next;
            cnt     <= k_next;
            m_prev2 <= m_prev;
            m_prev  <= m_new;
            if (cnt == '0) m1 <= m_new;
            if (crit && !found) begin
              found <= 1'b1;
              cm_u  <= m_prev;
              k_sel <= cnt;
            end
            if (k_next == K_W'(N)) state <= S_FIX;
          end
          S_FIX: begin
            if (!found) begin
              cm_u  <= m_prev;
              k_sel <= K_W'(N);
            end
            state <= S_RMS;
          end
          S_RMS: begin
            rms   <= rms_q;
            done  <= 1'b1;
            state <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
