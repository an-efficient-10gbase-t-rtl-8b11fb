// Testbench of a variable node group (column group 3). Priors are loaded, one
// iteration is issued (row groups 0..5), and the router outputs are checked
// two cycles after each VC cycle against the permutation worked out with
// GF(2^6) arithmetic in the testbench. Check-node results that differ per
// check are then returned, and the hard decisions after the posterior update
// are compared with a model that selects each VN's check through the same
// independently computed permutation.
module tb_vng;
  import ldpc_pkg::*;
  localparam int CG = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic load;
  llr_t prior [Z];
  stage_ctl_t vc_ctl, r_ctl, cv_ctl, ps_ctl;
  cn_out_t cn_out [Z];
  v2c_t to_cng [Z];
  logic [Z-1:0] hd, hd_snap;
  vng #(.CG(CG)) dut (.*);

  int checks = 0, failures = 0;
  stage_ctl_t dq [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gmul(int a, int b);
    int p = 0;
    for (int i = 0; i < 6; i++) if (b[i]) p ^= a << i;
    for (int i = 11; i >= 6; i--) if (p[i]) p ^= 'h43 << (i - 6);
    return p;
  endfunction
  function automatic int offs(int kk, int c);
    int a = 1;
    for (int i = 0; i < kk + c; i++) a = gmul(a, 2);
    return a;
  endfunction

  task automatic tick(stage_ctl_t w);
    dq.push_front(w);
    if (dq.size() > 7) void'(dq.pop_back());
    vc_ctl = w;
    r_ctl  = (dq.size() > 1) ? dq[1] : '0;
    cv_ctl = (dq.size() > 5) ? dq[5] : '0;
    ps_ctl = (dq.size() > 6) ? dq[6] : '0;
    @(posedge clk);
    #1;
  endtask

  initial begin
    int pr [Z];
    load = 0; vc_ctl = '0; r_ctl = '0; cv_ctl = '0; ps_ctl = '0;
    foreach (prior[i]) prior[i] = '0;
    for (int r = 0; r < Z; r++) cn_out[r] = '{min1: mag_t'(r % 4), min2: mag_t'(r % 4 + r % 3), prd: r[0], syn: 1'b0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int fr = 0; fr < 4; fr++) begin
      foreach (pr[v]) begin pr[v] = int'($urandom % 15) - 7; prior[v] = llr_t'(pr[v]); end
      load = 1; @(posedge clk); #1 load = 0;
      dq.delete();
      for (int c = 0; c < 14; c++) begin
        stage_ctl_t w;
        w = '0;
        if (c < 6) begin w.en = 1; w.k = rg_t'(c); end
        tick(w);
        if (c >= 1 && c < 7) begin
          int kk;
          kk = c - 1;
          for (int r = 0; r < Z; r++) begin
            int p, m;
            p = pr[r ^ offs(kk, CG)];
            m = (p < 0) ? -p : p;
            checks++;
            if (to_cng[r].sgn != (p < 0) || int'(to_cng[r].mag) != m) begin
              failures++; $display("fr%0d k%0d r%0d: got %p prior %0d", fr, kk, r, to_cng[r], p);
            end
          end
        end
      end
      for (int v = 0; v < Z; v++) begin
        int lps;
        lps = pr[v];
        for (int kk = 0; kk < N_RG; kk++) begin
          int r, m, q;
          r = v ^ offs(kk, CG);
          q = pr[v] < 0 ? -pr[v] : pr[v];
          m = (q == int'(cn_out[r].min1)) ? cn_out[r].min2 : cn_out[r].min1;
          m = (m > 1) ? m - 1 : 0;
          lps += (cn_out[r].prd ^ (pr[v] < 0)) ? -m : m;
          lps = (lps > 31) ? 31 : ((lps < -31) ? -31 : lps);
        end
        checks++;
        if (hd[v] != (lps < 0)) begin failures++; $display("fr%0d v%0d hd %0d exp lps %0d", fr, v, hd[v], lps); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
