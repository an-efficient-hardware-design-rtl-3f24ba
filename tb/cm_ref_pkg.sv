// Reference model of the common-mode method, written independently of the
// RTL for the testbenches: plain sorting, the division table, the gradual
// mean, the jump criterion and the rms approximation, all on integers.
package cm_ref_pkg;

  typedef int vec16_t [16];

  // division factors for k = 0..16 (0 where k is a power of two)
  localparam int FACT [17] = '{0, 0, 0, 85, 0, 51, 43, 37, 0, 28, 26, 23, 21, 20, 18, 17, 0};

  function automatic int ref_div(int s, int k);
    case (k)
      1: return s;
      2: return s / 2;
      4: return s / 4;
      8: return s / 8;
      16: return s / 16;
      default: return (s * FACT[k]) / 256;
    endcase
  endfunction

  function automatic vec16_t ref_sort(vec16_t v);
    vec16_t r = v;
    for (int i = 1; i < 16; i++)
      for (int j = i; j > 0 && r[j-1] > r[j]; j--) begin
        int t = r[j]; r[j] = r[j-1]; r[j-1] = t;
      end
    return r;
  endfunction

  // number of sort passes: bits of (max - min), at least 1
  function automatic int ref_npass(vec16_t v);
    vec16_t s = ref_sort(v);
    int spread = s[15] - s[0];
    int n = 1;
    for (int i = 1; i < 12; i++) if ((spread >> i) & 1) n = i + 1;
    return n;
  endfunction

  // common mode (signed), k and rms of a group of 16 signed samples
  task automatic ref_cm(input vec16_t v, input int c1, input int c2,
                        output int cm, output int k_sel, output int rms);
    vec16_t s = ref_sort(v);
    int m [17];
    int sum = 0;
    int off = s[0];
    for (int k = 1; k <= 16; k++) begin
      sum += s[k-1] - off;
      m[k] = ref_div(sum, k);
    end
    m[0] = m[1];
    k_sel = 16;
    for (int k = 1; k <= 15; k++)
      if ((m[k] - m[k-1] < c1) && (m[k+1] - m[k] >= c2)) begin
        k_sel = k;
        break;
      end
    cm  = m[k_sel] + off;
    rms = (m[k_sel] > m[1]) ? ref_div((m[k_sel] - m[1]) * 4, k_sel) : 0;
  endtask

  // Roughly normal noise: sum of four uniform draws, rms about 'sigma'.
  function automatic int ref_noise(int sigma);
    int a = 0;
    for (int i = 0; i < 4; i++) a += $urandom_range(0, 2 * sigma) - sigma;
    return a * 10 / 12;
  endfunction

  // A group of 16 pedestal-subtracted samples: a common mode, a small
  // strip-to-strip variation of it, channel noise and 'nhits' strips with
  // particle charge. Values are clipped to the 12-bit signed range.
  function automatic vec16_t ref_group(int cm, int sigma, int nhits, int qmax);
    vec16_t v;
    for (int i = 0; i < 16; i++) v[i] = cm + ref_noise(sigma);
    for (int h = 0; h < nhits; h++) v[$urandom_range(0, 15)] += $urandom_range(qmax / 8 + 1, qmax);
    for (int i = 0; i < 16; i++) begin
      if (v[i] > 2047) v[i] = 2047;
      if (v[i] < -2048) v[i] = -2048;
    end
    return v;
  endfunction

endpackage
