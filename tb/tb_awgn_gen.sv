// Testbench of the AWGN channel emulator. Checked: with sigma = 0 every LLR
// equals round(+-llr_scale) (sign by codeword); with sigma = 1 and
// llr_scale = 2 the sample mean and variance over all lanes are close to
// those of round(2(+-1 + n)) saturated to +-7 for unit Gaussian n (worked
// out in the testbench by numerical integration); valid follows en by one
// cycle and the outputs hold while en is low.
module tb_awgn_gen;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en, send_one, valid;
  logic [11:0] sigma, llr_scale;
  llr_t llr [Z];
  awgn_gen dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mean and variance of sat7(round(2*(s + n))), n ~ N(0,1)
  task automatic expected_stats(input real s, output real m, output real v);
    real p, x, q, e1, e2, dx;
    e1 = 0; e2 = 0; dx = 0.001;
    for (x = -8.0; x < 8.0; x += dx) begin
      p = $exp(-x*x/2.0) / $sqrt(2.0*3.14159265358979) * dx;
      q = 2.0 * (s + x);
      q = (q >= 0) ? $floor(q + 0.5) : -$floor(-q + 0.5);
      if (q > 7) q = 7;
      if (q < -7) q = -7;
      e1 += p * q; e2 += p * q * q;
    end
    m = e1; v = e2 - e1 * e1;
  endtask

  initial begin
    real sum, sq, mean, var_, em, ev;
    int n;
    en = 0; send_one = 0; sigma = '0; llr_scale = 12'd768;   // 3.0
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // noiseless
    for (int one = 0; one < 2; one++) begin
      send_one = one[0];
      @(negedge clk); en = 1;
      @(negedge clk); en = 0;
      checks++;
      if (!valid) begin failures++; $display("valid missing"); end
      foreach (llr[l]) begin
        checks++;
        if (llr[l] != (one ? -4'sd3 : 4'sd3)) begin failures++; $display("noiseless lane %0d: %0d", l, llr[l]); end
      end
      @(negedge clk);
      checks++;
      if (valid) begin failures++; $display("valid without en"); end
    end
    // noisy
    sigma = 12'd256; llr_scale = 12'd512;
    for (int one = 0; one < 2; one++) begin
      send_one = one[0];
      sum = 0; sq = 0; n = 0;
      @(negedge clk); en = 1;
      repeat (400) begin
        @(negedge clk);
        foreach (llr[l]) begin sum += real'(llr[l]); sq += real'(llr[l]) * real'(llr[l]); n++; end
      end
      en = 0;
      mean = sum / n; var_ = sq / n - mean * mean;
      expected_stats(one ? -1.0 : 1.0, em, ev);
      $display("codeword %0d: mean %0.3f (expected %0.3f) variance %0.3f (expected %0.3f)", one, mean, em, var_, ev);
      checks += 2;
      if (mean < em - 0.1 || mean > em + 0.1) begin failures++; $display("mean out of range"); end
      if (var_ < ev * 0.9 || var_ > ev * 1.1) begin failures++; $display("variance out of range"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
