// VNG router: routes the 64 variable-to-check messages of one variable node
// group (column group CG) to the 64 check nodes of the check node group.
//
// For row group k the submatrix of column group CG is a permutation, so
// check r receives the message of VN r XOR s(k,CG) (see ldpc_pkg). Each of
// the 64 outputs is a 6:1 multiplexer over the six fixed permutations,
// selected by the row group in the R stage. The output is registered: this
// is the R ("route v-to-c message in VNG") stage of the 7-stage pipeline,
// one cycle of latency.
module vng_router
  import ldpc_pkg::*;
#(
  parameter int CG = 0              // column group served by this router
) (
  input  logic clk,
  input  logic rst_n,
  input  rg_t  k,                   // row group in the R stage
  input  v2c_t vn_msg [Z],          // by VN index
  output v2c_t cn_msg [Z]           // by CN index, registered
);

  v2c_t routed [Z];

  for (genvar r = 0; r < Z; r++) begin : g_mux
    v2c_t cand [N_RG];
    for (genvar kk = 0; kk < N_RG; kk++) begin : g_k
      localparam int OFF = int'(perm_off(kk, CG));
      assign cand[kk] = vn_msg[r ^ OFF];
    end
    assign routed[r] = (int'(k) < N_RG) ? cand[k] : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) cn_msg <= '{default: '0};
    else        cn_msg <= routed;
  end

endmodule
