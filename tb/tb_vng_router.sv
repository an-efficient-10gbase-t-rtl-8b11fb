// Testbench of the VNG router: two instances (column groups 0 and 19) route
// random message vectors for random row groups; each output is compared one
// cycle later with the permutation worked out in the testbench from GF(2^6)
// multiplication (offset alpha^(k+c), alpha a root of x^6+x+1).
module tb_vng_router;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  rg_t  k;
  v2c_t vn_msg [Z];
  v2c_t o0 [Z], o1 [Z];
  vng_router #(.CG(0))  dut0 (.clk, .rst_n, .k, .vn_msg, .cn_msg(o0));
  vng_router #(.CG(19)) dut1 (.clk, .rst_n, .k, .vn_msg, .cn_msg(o1));

  int checks = 0, failures = 0;

  initial begin
    repeat (3000) @(posedge clk);
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

  initial begin
    v2c_t prev [Z];
    int   kp;
    k = '0;
    foreach (vn_msg[i]) vn_msg[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      if (t > 0) begin
        for (int r = 0; r < Z; r++) begin
          checks += 2;
          if (o0[r] !== prev[r ^ offs(kp, 0)])  begin failures++; $display("cg0 k=%0d r=%0d", kp, r); end
          if (o1[r] !== prev[r ^ offs(kp, 19)]) begin failures++; $display("cg19 k=%0d r=%0d", kp, r); end
        end
      end
      kp = $urandom % N_RG;
      k  = rg_t'(kp);
      foreach (vn_msg[i]) vn_msg[i] = v2c_t'($urandom);
      prev = vn_msg;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
