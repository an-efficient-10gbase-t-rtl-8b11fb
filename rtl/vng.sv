// Variable node group (VNG): the 64 VNs of one column group, their router
// and the return wiring.
//
// Forward: the VNs' registered messages pass through the VNG router (R
// stage) to the check node group. Return: the broadcast outputs of the 64
// check nodes are wired so that VN v sees, for each row group k, the output
// of check v XOR s(k,CG); the VN's own 6:1 multiplexer then selects by row
// group. All irregular wiring of the code is local to this block; outside it
// every wire bundle is regular.
module vng
  import ldpc_pkg::*;
#(
  parameter int CG       = 0,
  parameter int BETA     = 1,
  parameter int WEAK_MAG = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  llr_t       prior [Z],
  input  stage_ctl_t vc_ctl,
  input  stage_ctl_t r_ctl,
  input  stage_ctl_t cv_ctl,
  input  stage_ctl_t ps_ctl,
  input  cn_out_t    cn_out [Z],     // broadcast from the CNG
  output v2c_t       to_cng [Z],     // router output, by check
  output logic [Z-1:0] hd,
  output logic [Z-1:0] hd_snap
);

  v2c_t vn_msg [Z];

  for (genvar v = 0; v < Z; v++) begin : g_vn
    cn_out_t cn_in [N_RG];
    for (genvar k = 0; k < N_RG; k++) begin : g_ret
      localparam int OFF = int'(perm_off(k, CG));
      assign cn_in[k] = cn_out[v ^ OFF];
    end
    vn #(.BETA(BETA), .WEAK_MAG(WEAK_MAG)) u_vn (
      .clk, .rst_n, .load,
      .prior_in (prior[v]),
      .vc_ctl, .cv_ctl, .ps_ctl,
      .cn_in,
      .v2c_out  (vn_msg[v]),
      .hd       (hd[v]),
      .hd_snap  (hd_snap[v])
    );
  end

  vng_router #(.CG(CG)) u_router (
    .clk, .rst_n,
    .k      (r_ctl.k),
    .vn_msg (vn_msg),
    .cn_msg (to_cng)
  );

endmodule
