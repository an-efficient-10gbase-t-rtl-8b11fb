// Self-checking testbench of the decoder, built with 8 of the 32 column
// groups (a 512-bit code of the same construction) to keep simulation short.
// Frames of the all-zeros or all-ones codeword with Gaussian noise at several
// noise levels are decoded and compared, bit for bit, with a behavioural
// reference of the same algorithm (the ldpc_ref_pkg package): decoded bits, converged
// flag, iteration count and the frame latency of 1 + 12 cycles per iteration.
// Mechanisms counted: early termination, iteration limit, post-processing
// (tagging and biasing), output back-pressure.
module tb_ldpc_decoder;
  import ldpc_pkg::*;
  localparam int NCG = 8;             // 8 column groups: 512-bit code, check degree 8
  localparam int NB  = Z * NCG;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, out_ready, pp_en, et_en;
  logic [ITER_W-1:0] max_iter;
  llr_t prior [NB];
  logic load, busy, done, converged, pp_used;
  logic [ITER_W-1:0] iters;
  logic [NB-1:0] dec_bits;

  ldpc_decoder #(.NCG(NCG)) dut (.*);

  import ldpc_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_et = 0, n_limit = 0, n_pp = 0, n_tag = 0, n_bias = 0, n_bp = 0, n_fixed = 0;
  longint cyc = 0;
  int held = 0;            // FIN cycles spent waiting for out_ready
  always @(posedge clk) begin
    cyc++;
    if (dut.u_ctrl.state == 2'd2 && !out_ready) held++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(bit one, real sigma, int mi, bit pp, bit et, int hold);
    longint t_load, t_done;
    int bad;
    for (int b = 0; b < NB; b++) begin
      ref_prior[b] = ref_channel_llr(one, sigma, 2.5);
      prior[b] = llr_t'(ref_prior[b]);
    end
    ref_decode(NCG, mi, pp, et, 4, 1, 1);
    max_iter = ITER_W'(mi); pp_en = pp; et_en = et;
    out_ready = (hold == 0);
    held = 0;
    start = 1;
    do @(posedge clk); while (!load);
    t_load = cyc;
    #1 start = 0;
    if (hold > 0) begin
      while (!(dut.u_ctrl.state == 2'd2)) @(posedge clk);
      repeat (hold) begin @(posedge clk); #1 if (done) begin failures++; $display("done while held"); end end
      out_ready = 1;
      n_bp++;
    end
    do @(posedge clk); while (!done);
    t_done = cyc;
    bad = 0;
    for (int b = 0; b < NB; b++) if (dec_bits[b] != ref_bits[b]) bad++;
    checks += 5;
    if (bad != 0) begin failures++; $display("frame: %0d bits differ from reference", bad); end
    if (converged != ref_conv) begin failures++; $display("converged %0d ref %0d", converged, ref_conv); end
    if (int'(iters) != ref_iters) begin failures++; $display("iters %0d ref %0d", iters, ref_iters); end
    if (t_done - t_load != longint'(12*ref_iters_run + 1 + held)) begin
      failures++; $display("latency %0d expected %0d", t_done - t_load, 12*ref_iters_run + 1 + held);
    end
    if (held < hold) begin failures++; $display("back-pressure not seen"); end
    if (ref_conv) n_et++; else n_limit++;
    if (pp_used) n_pp++;
    if (ref_n_tagged > 0) n_tag++;
    if (ref_n_biased > 0) n_bias++;
    if (ref_conv && pp && ref_iters > mi) n_fixed++;
    begin
      int errs = 0;
      for (int b = 0; b < NB; b++) if (dec_bits[b] != one) errs++;
      $display("frame one=%0d sigma=%0.2f it=%0d conv=%0d pp=%0d errors=%0d latency=%0d",
               one, sigma, iters, converged, pp_used, errs, t_done - t_load);
    end
    @(negedge clk);
  endtask

  initial begin
    start = 0; out_ready = 1; pp_en = 0; et_en = 1; max_iter = 8;
    foreach (prior[i]) prior[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    run_frame(0, 0.55, 8, 1, 1, 0);
    run_frame(1, 0.60, 8, 1, 1, 0);
    run_frame(0, 0.70, 8, 1, 1, 3);
    run_frame(0, 0.55, 8, 0, 0, 0);   // no early termination: full 8 iterations
    run_frame(1, 1.40, 8, 1, 1, 0);   // heavy noise: limit and post-processing
    run_frame(0, 1.20, 4, 1, 1, 0);
    run_frame(0, 0.80, 8, 1, 1, 0);
    run_frame(1, 0.75, 3, 1, 1, 0);
    checks++;
    if (n_et == 0 || n_limit == 0 || n_pp == 0 || n_tag == 0 || n_bias == 0 || n_bp == 0) begin
      failures++;
      $display("mechanism not exercised: et=%0d limit=%0d pp=%0d tag=%0d bias=%0d backpressure=%0d",
               n_et, n_limit, n_pp, n_tag, n_bias, n_bp);
    end
    $display("mechanisms: early_termination=%0d iteration_limit=%0d post_processing=%0d tagging=%0d biasing=%0d backpressure=%0d pp_rescued=%0d",
             n_et, n_limit, n_pp, n_tag, n_bias, n_bp, n_fixed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
