// Grouped-parallel (32VNG-1CNG) offset min-sum LDPC decoder for the
// (2048,1723) RS-LDPC code of 10GBASE-T, with post-processing and early
// termination.
//
// 32 variable node groups (one per 64-column group of H, 2048 VNs in all)
// and one check node group of 64 CNs. In each cycle one of the six row
// groups is processed: every VN sends one message, each VNG router permutes
// its 64 messages onto the 64 CNs, and the CN results are broadcast back.
// The 7-stage pipeline is VC (VN) - R (router) - CS1 - CS2 - CS3 (CN) -
// CV - PS (VN); an iteration takes 12 cycles including a 6-cycle stall.
//
// Interface: when start is high and the decoder is free, load pulses and
// prior[] is captured (one cycle). done pulses when the frame ends and
// out_ready is high; dec_bits[] (1 = bit one), converged and iters are valid
// in that cycle. Bit index b = 64*c + v for VN v of column group c.
// Latency per frame: 1 load cycle + 12 cycles per iteration (+ FIN cycles
// while out_ready is low).
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int NCG      = N_CG,     // column groups (VNGs); code length 64*NCG
  parameter int PP_ITER  = 4,
  parameter int BETA     = 1,
  parameter int WEAK_MAG = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  llr_t              prior [Z*NCG],
  input  logic              out_ready,
  input  logic [ITER_W-1:0] max_iter,
  input  logic              pp_en,
  input  logic              et_en,
  output logic              load,
  output logic              busy,
  output logic              done,
  output logic              converged,
  output logic [ITER_W-1:0] iters,
  output logic              pp_used,
  output logic [Z*NCG-1:0]  dec_bits
);

  stage_ctl_t vc_ctl, r_ctl, cv_ctl, ps_ctl;
  logic       syn_any, use_snap;
  v2c_t       vng_msg [NCG][Z];
  cn_out_t    cn_out  [Z];
  logic [Z*NCG-1:0] hd, hd_snap;

  decoder_ctrl #(.PP_ITER(PP_ITER)) u_ctrl (
    .clk, .rst_n, .start, .out_ready, .max_iter, .pp_en, .et_en, .syn_any,
    .load, .vc_ctl, .r_ctl, .cv_ctl, .ps_ctl, .busy, .done, .converged,
    .use_snap, .iters, .pp_used
  );

  for (genvar c = 0; c < NCG; c++) begin : g_vng
    llr_t pr [Z];
    for (genvar v = 0; v < Z; v++) begin : g_pr
      assign pr[v] = prior[c*Z + v];
    end
    vng #(.CG(c), .BETA(BETA), .WEAK_MAG(WEAK_MAG)) u_vng (
      .clk, .rst_n, .load,
      .prior   (pr),
      .vc_ctl, .r_ctl, .cv_ctl, .ps_ctl,
      .cn_out  (cn_out),
      .to_cng  (vng_msg[c]),
      .hd      (hd[c*Z +: Z]),
      .hd_snap (hd_snap[c*Z +: Z])
    );
  end

  cng #(.NCG(NCG)) u_cng (.clk, .rst_n, .vng_msg, .cn_out, .syn_any);

  assign dec_bits = use_snap ? hd_snap : hd;

endmodule
