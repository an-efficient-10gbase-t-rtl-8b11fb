// Bit-accurate behavioural reference of the decoder algorithm, shared by the
// decoder and chip testbenches. It works on whole iterations (flooding
// schedule), independently of the hardware pipeline, using the same H
// structure (ldpc_pkg::perm_off), number formats and termination rules.
package ldpc_ref_pkg;
  import ldpc_pkg::*;

int ref_prior [N_BITS];
int ref_lps   [N_BITS];
int ref_rold  [N_BITS][N_RG];
bit ref_etag  [N_BITS][N_RG];
bit ref_vtag  [N_BITS];
bit ref_bits  [N_BITS];
int ref_iters;
bit ref_conv;
int ref_iters_run;
int ref_n_tagged;
int ref_n_biased;

function automatic int ref_sat(int x, int m);
  return (x > m) ? m : ((x < -m) ? -m : x);
endfunction

task automatic ref_decode(input int ncg, input int max_iter, input bit pp_en, input bit et_en,
                          input int pp_iter, input int beta, input int weak_mag);
  int limit, it;
  int rnew [N_BITS][N_RG];
  bit hd_prev [N_BITS];
  bit unsat;
  int q_s [N_CG], q_m [N_CG], vv [N_CG];
  ref_n_tagged = 0;
  ref_n_biased = 0;
  for (int b = 0; b < Z*ncg; b++) begin
    ref_lps[b] = ref_prior[b];
    ref_vtag[b] = 0;
    for (int k = 0; k < N_RG; k++) begin ref_rold[b][k] = 0; ref_etag[b][k] = 0; end
  end
  limit = max_iter + (pp_en ? pp_iter : 0);
  it = 1;
  forever begin
    bit tag_it, bias_it;
    tag_it  = pp_en && (it == max_iter);
    bias_it = pp_en && (it == max_iter + 1);
    unsat = 0;
    for (int b = 0; b < Z*ncg; b++) hd_prev[b] = (ref_lps[b] < 0);
    for (int k = 0; k < N_RG; k++) begin
      for (int r = 0; r < Z; r++) begin
        int m1, m2; bit prd, syn, tagnow;
        m1 = 99; m2 = 99; prd = 0; syn = 0;
        for (int c = 0; c < ncg; c++) begin
          int d;
          vv[c] = c*Z + (r ^ int'(perm_off(k, c)));
          d = ref_lps[vv[c]] - ref_rold[vv[c]][k];
          q_s[c] = (d < 0);
          q_m[c] = (d < 0) ? -d : d;
          if (q_m[c] > MAG_MAX) q_m[c] = MAG_MAX;
          if (bias_it && ref_vtag[vv[c]] && !ref_etag[vv[c]][k] && q_m[c] > weak_mag) begin
            q_m[c] = weak_mag;
            ref_n_biased++;
          end
          prd ^= q_s[c];
          syn ^= hd_prev[vv[c]];
          if (q_m[c] < m1) begin m2 = m1; m1 = q_m[c]; end
          else if (q_m[c] < m2) m2 = q_m[c];
        end
        unsat |= syn;
        tagnow = tag_it && prd;
        for (int c = 0; c < ncg; c++) begin
          int m;
          m = (q_m[c] == m1) ? m2 : m1;
          m = (m > beta) ? m - beta : 0;
          rnew[vv[c]][k] = (prd ^ q_s[c]) ? -m : m;
          if (tagnow) begin
            if (!ref_vtag[vv[c]]) ref_n_tagged++;
            ref_etag[vv[c]][k] = 1;
            ref_vtag[vv[c]] = 1;
          end
        end
      end
    end
    // posterior: prior plus the six new messages, saturating after each add
    for (int b = 0; b < Z*ncg; b++) begin
      int acc;
      acc = ref_prior[b];
      for (int k = 0; k < N_RG; k++) begin
        acc = ref_sat(acc + rnew[b][k], (1 << (PS_W-1)) - 1);
        ref_rold[b][k] = rnew[b][k];
      end
      ref_lps[b] = acc;
    end
    if (et_en && !unsat) begin
      ref_conv = 1; ref_iters = it - 1; ref_iters_run = it;
      for (int b = 0; b < Z*ncg; b++) ref_bits[b] = hd_prev[b];
      return;
    end
    if (it >= limit) begin
      ref_conv = 0; ref_iters = it; ref_iters_run = it;
      for (int b = 0; b < Z*ncg; b++) ref_bits[b] = (ref_lps[b] < 0);
      return;
    end
    it++;
  end
endtask

// Channel LLR for a bit of the all-zeros (ones = 0) or all-ones codeword:
// BPSK (+1 for bit 0) plus Gaussian noise of deviation sigma (sum of 12
// uniforms), scaled by lscale, rounded and saturated to 4 bits.
function automatic int ref_channel_llr(bit one, real sigma, real lscale);
  real g, y;
  g = 0.0;
  for (int i = 0; i < 12; i++) g += real'($urandom % 65536) / 65536.0;
  g -= 6.0;
  y = (one ? -1.0 : 1.0) + sigma * g;
  return ref_sat(int'(y * lscale), MAG_MAX);
endfunction

endpackage
