// Testbench of the variable node. The testbench plays the controller (VC
// words for row groups 0..5 in the first six cycles of each 12-cycle
// iteration, delayed by 5 and 6 cycles for CV and PS) and the check nodes
// (random min1 <= min2 and sign product per row group, with min1 often set
// equal to the VN's own magnitude). A model of the VN arithmetic in the
// testbench predicts every variable-to-check message, the hard decision and
// the snapshot. Iteration 3 is a pre-biasing (tag) iteration and iteration 4
// a biasing one, so tagging and message weakening are checked as well.
module tb_vn;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic load;
  llr_t prior_in;
  stage_ctl_t vc_ctl, cv_ctl, ps_ctl;
  cn_out_t cn_in [N_RG];
  v2c_t v2c_out;
  logic hd, hd_snap;
  vn dut (.*);

  int checks = 0, failures = 0, n_biased = 0, n_tagged = 0, n_min2 = 0;
  stage_ctl_t dq [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(int x, int m);
    return (x > m) ? m : ((x < -m) ? -m : x);
  endfunction

  // one cycle: VC word in, CV/PS words from the delay line
  task automatic tick(stage_ctl_t w);
    dq.push_front(w);
    if (dq.size() > 7) void'(dq.pop_back());
    vc_ctl = w;
    cv_ctl = (dq.size() > 5) ? dq[5] : '0;
    ps_ctl = (dq.size() > 6) ? dq[6] : '0;
    @(posedge clk);
    #1;
  endtask

  initial begin
    int pr, lps, rold [N_RG], rnew [N_RG], qs [N_RG], qm [N_RG];
    bit etag [N_RG], vtag;
    load = 0; prior_in = '0; vc_ctl = '0; cv_ctl = '0; ps_ctl = '0;
    foreach (cn_in[i]) cn_in[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int fr = 0; fr < 40; fr++) begin
      pr = int'($urandom % 15) - 7;
      prior_in = llr_t'(pr);
      load = 1;
      @(posedge clk); #1 load = 0;
      dq.delete();
      lps = pr; vtag = 0;
      foreach (rold[k]) begin rold[k] = 0; etag[k] = 0; end
      for (int it = 1; it <= 6; it++) begin
        bit tag_it, bias_it, snap;
        tag_it = (fr % 2 == 0) && (it == 3);
        bias_it = (fr % 2 == 0) && (it == 4);
        snap = (lps < 0);
        // check-node results for this iteration
        for (int k = 0; k < N_RG; k++) begin
          int a, b;
          int d;
          d = lps - rold[k];
          qs[k] = (d < 0);
          qm[k] = (d < 0) ? -d : d;
          if (qm[k] > 7) qm[k] = 7;
          if (bias_it && vtag && !etag[k] && qm[k] > 1) begin qm[k] = 1; n_biased++; end
          a = $urandom % 8; b = $urandom % 8;
          if ($urandom % 3 == 0) a = qm[k];
          if (a > b) begin int t = a; a = b; b = t; end
          cn_in[k] = '{min1: mag_t'(a), min2: mag_t'(b), prd: 1'($urandom), syn: 1'b0};
        end
        for (int c = 0; c < 12; c++) begin
          stage_ctl_t w;
          w = '0;
          if (c < 6) begin w.en = 1; w.k = rg_t'(c); w.tag = tag_it; w.bias = bias_it; end
          tick(w);
          if (c < 6) begin
            checks++;
            if (v2c_out.sgn != qs[c][0] || int'(v2c_out.mag) != qm[c] || v2c_out.hd != snap) begin
              failures++;
              $display("fr%0d it%0d k%0d: got %p exp s%0d m%0d", fr, it, c, v2c_out, qs[c], qm[c]);
            end
          end
        end
        // model of CV and PS
        for (int k = 0; k < N_RG; k++) begin
          int m;
          if (qm[k] == int'(cn_in[k].min1)) begin m = cn_in[k].min2; n_min2++; end
          else m = cn_in[k].min1;
          m = (m > 1) ? m - 1 : 0;
          rnew[k] = (cn_in[k].prd ^ qs[k][0]) ? -m : m;
          if (tag_it && cn_in[k].prd) begin etag[k] = 1; if (!vtag) n_tagged++; vtag = 1; end
        end
        lps = pr;
        for (int k = 0; k < N_RG; k++) begin lps = sat(lps + rnew[k], 31); rold[k] = rnew[k]; end
        checks += 2;
        if (hd != (lps < 0)) begin failures++; $display("hd wrong fr%0d it%0d", fr, it); end
        if (hd_snap != snap) begin failures++; $display("hd_snap wrong fr%0d it%0d", fr, it); end
      end
    end
    checks++;
    if (n_biased == 0 || n_tagged == 0 || n_min2 == 0) begin
      failures++; $display("coverage: biased=%0d tagged=%0d min2=%0d", n_biased, n_tagged, n_min2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
