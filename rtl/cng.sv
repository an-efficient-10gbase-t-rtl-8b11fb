// Check node group (CNG): the 64 check nodes of the 32VNG-1CNG architecture.
//
// In each cycle the CNG processes one row group: check r takes input c from
// VNG c's router output r. The (min1, min2, prd, syn) results are broadcast
// to all 32 VNGs, where each VN picks the check it belongs to. syn_any is the
// OR of the 64 syn outputs, used by the controller for early termination.
// NCG (32) is a parameter so that smaller versions of the code can be
// simulated quickly. Latency: three cycles (CS1, CS2, CS3) from router output to cn_out.
module cng
  import ldpc_pkg::*;
#(
  parameter int NCG = N_CG             // column groups = check degree
) (
  input  logic    clk,
  input  logic    rst_n,
  input  v2c_t    vng_msg [NCG][Z],    // [column group][check]
  output cn_out_t cn_out  [Z],
  output logic    syn_any
);

  for (genvar r = 0; r < Z; r++) begin : g_cn
    v2c_t col [NCG];
    for (genvar c = 0; c < NCG; c++) begin : g_col
      assign col[c] = vng_msg[c][r];
    end
    cn #(.N_IN(NCG)) u_cn (.clk, .rst_n, .msg_in(col), .cn_out(cn_out[r]));
  end

  always_comb begin
    syn_any = 1'b0;
    for (int r = 0; r < Z; r++) syn_any |= cn_out[r].syn;
  end

endmodule
