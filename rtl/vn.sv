// Variable node (VN) with the post-processor.
//
// One VN per code bit. Three memories: the prior LLR, the posterior LLR
// accumulator and the extrinsic memory, a six-entry shift register of the
// check-to-variable messages of the last iteration. Per iteration the VN
// takes part in six row-group operations, one per cycle:
//   VC stage: q = posterior(previous iteration) - c2v(previous iteration, k),
//             saturated to 3-bit magnitude and sent in sign-magnitude form.
//   CV stage (5 cycles later): the VN selects the broadcast (min1, min2, prd)
//             of its check in row group k with a 6:1 multiplexer, takes min2
//             if its own magnitude equals min1, else min1, subtracts the
//             offset BETA (floored at 0), gives it the sign prd XOR its own
//             sign and converts to two's complement. The result is shifted
//             into the extrinsic memory.
//   PS stage (6 cycles later): the message is accumulated into the posterior
//             (the first of the six is added to the prior), saturating.
// The hard decision is the sign of the posterior. hd_snap holds the hard
// decision that was sent in the first VC cycle of the current iteration, i.e.
// the decision the current iteration's syndrome check refers to.
//
// Post-processing: in the pre-biasing iteration (cv_ctl.tag) an unsatisfied
// check (prd = 1) tags the edge it arrived on and the VN. In the biasing
// iteration (vc_ctl.bias) a tagged VN sending to an untagged (satisfied)
// check limits the message magnitude to WEAK_MAG. Tags clear on load.
//
// The three-stage data flow, the shift-register extrinsic memory, min1/min2
// selection and the tag/bias rules follow the published design; the posterior
// width, BETA = 1 and WEAK_MAG = 1 are this design's choices.
// Timing: load takes one cycle; all outputs are registered.
module vn
  import ldpc_pkg::*;
#(
  parameter int BETA     = 1,
  parameter int WEAK_MAG = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,          // capture prior, start a new frame
  input  llr_t       prior_in,
  input  stage_ctl_t vc_ctl,
  input  stage_ctl_t cv_ctl,
  input  stage_ctl_t ps_ctl,
  input  cn_out_t    cn_in [N_RG],  // the six checks of this bit, by row group
  output v2c_t       v2c_out,       // registered VC stage output
  output logic       hd,            // sign of the posterior
  output logic       hd_snap
);

  llr_t       prior_q;
  post_t      lps;
  c2v_t       ext_sr [N_RG];        // ext_sr[0] newest
  v2c_t       q_pipe [5];           // sent message, kept until the CV stage
  c2v_t       r_q;                  // CV stage result for the PS stage
  logic [N_RG-1:0] edge_tag;
  logic       vn_tag;

  // ---------------- VC stage ----------------
  c2v_t                r_old;
  logic signed [PS_W:0] diff;
  logic [PS_W:0]        diff_abs;
  v2c_t                q_c;

  always_comb begin
    r_old    = ext_sr[N_RG-1-int'(vc_ctl.k)];
    diff     = (PS_W+1)'(lps) - (PS_W+1)'(r_old);
    diff_abs = diff[PS_W] ? -diff : diff;
    q_c.sgn  = diff[PS_W];
    q_c.mag  = (diff_abs > (PS_W+1)'(MAG_MAX)) ? mag_t'(MAG_MAX) : mag_t'(diff_abs);
    q_c.hd   = lps[PS_W-1];
    if (vc_ctl.bias && vn_tag && !edge_tag[vc_ctl.k] && q_c.mag > mag_t'(WEAK_MAG))
      q_c.mag = mag_t'(WEAK_MAG);
  end

  // ---------------- CV stage ----------------
  cn_out_t cn_sel;
  v2c_t    q_own;
  mag_t    m_sel, m_off;
  logic    r_sgn;
  c2v_t    r_c;

  always_comb begin
    cn_sel = cn_in[cv_ctl.k];
    q_own  = q_pipe[4];
    m_sel  = (q_own.mag == cn_sel.min1) ? cn_sel.min2 : cn_sel.min1;
    m_off  = (m_sel > mag_t'(BETA)) ? m_sel - mag_t'(BETA) : '0;
    r_sgn  = cn_sel.prd ^ q_own.sgn;
    r_c    = r_sgn ? -c2v_t'({1'b0, m_off}) : c2v_t'({1'b0, m_off});
  end

  // ---------------- PS stage ----------------
  logic signed [PS_W:0] acc;
  localparam int PS_MAX = (1 << (PS_W-1)) - 1;

  always_comb begin
    acc = (ps_ctl.k == '0) ? (PS_W+1)'(prior_q) + (PS_W+1)'(r_q)
                           : (PS_W+1)'(lps)     + (PS_W+1)'(r_q);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prior_q  <= '0;
      lps      <= '0;
      ext_sr   <= '{default: '0};
      q_pipe   <= '{default: '0};
      r_q      <= '0;
      edge_tag <= '0;
      vn_tag   <= 1'b0;
      hd_snap  <= 1'b0;
    end else if (load) begin
      prior_q  <= prior_in;
      lps      <= post_t'(prior_in);
      ext_sr   <= '{default: '0};
      edge_tag <= '0;
      vn_tag   <= 1'b0;
    end else begin
      q_pipe[0] <= q_c;
      for (int i = 1; i < 5; i++) q_pipe[i] <= q_pipe[i-1];
      if (vc_ctl.en && vc_ctl.k == '0) hd_snap <= lps[PS_W-1];
      if (cv_ctl.en) begin
        r_q       <= r_c;
        ext_sr[0] <= r_c;
        for (int i = 1; i < N_RG; i++) ext_sr[i] <= ext_sr[i-1];
        if (cv_ctl.tag && cn_sel.prd) begin
          edge_tag[cv_ctl.k] <= 1'b1;
          vn_tag             <= 1'b1;
        end
      end
      if (ps_ctl.en) begin
        if (acc > (PS_W+1)'(PS_MAX))       lps <= post_t'(PS_MAX);
        else if (acc < -(PS_W+1)'(PS_MAX)) lps <= post_t'(-PS_MAX);
        else                    lps <= post_t'(acc);
      end
    end
  end

  assign v2c_out = q_pipe[0];
  assign hd      = lps[PS_W-1];

endmodule
