// Testbench of the check node group: random messages from the 32 VNGs for
// all 64 checks each cycle; every check's (min1, min2, prd, syn) and the
// OR of the syn bits are compared three cycles later with values computed
// in the testbench. Some cycles carry all-even hard decisions so syn_any is
// seen both low and high.
module tb_cng;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  v2c_t    vng_msg [N_CG][Z];
  cn_out_t cn_out  [Z];
  logic    syn_any;
  cng dut (.*);

  int checks = 0, failures = 0, n_syn0 = 0, n_syn1 = 0;
  cn_out_t exp_ring [4][Z];    // expected results, indexed by cycle mod 4
  logic    syn_ring [4];

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (vng_msg[c, r]) vng_msg[c][r] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      logic sa;
      @(negedge clk);
      foreach (vng_msg[c, r]) begin
        vng_msg[c][r] = v2c_t'($urandom);
        if (t % 3 == 0) vng_msg[c][r].hd = 1'b0;
      end
      sa = 1'b0;
      for (int r = 0; r < Z; r++) begin
        int m [N_CG];
        exp_ring[t % 4][r] = '0;
        for (int c = 0; c < N_CG; c++) begin
          m[c] = vng_msg[c][r].mag;
          exp_ring[t % 4][r].prd ^= vng_msg[c][r].sgn;
          exp_ring[t % 4][r].syn ^= vng_msg[c][r].hd;
        end
        m.sort();
        exp_ring[t % 4][r].min1 = mag_t'(m[0]);
        exp_ring[t % 4][r].min2 = mag_t'(m[1]);
        sa |= exp_ring[t % 4][r].syn;
      end
      syn_ring[t % 4] = sa;
      if (t >= 3) begin
        logic xs;
        xs = syn_ring[(t - 3) % 4];
        for (int r = 0; r < Z; r++) begin
          checks++;
          if (cn_out[r] !== exp_ring[(t - 3) % 4][r]) begin failures++; $display("t=%0d r=%0d", t, r); end
        end
        checks++;
        if (syn_any !== xs) begin failures++; $display("syn_any t=%0d", t); end
        if (xs) n_syn1++; else n_syn0++;
      end
    end
    checks++;
    if (n_syn0 == 0 || n_syn1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
