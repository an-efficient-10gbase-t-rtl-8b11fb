// Testbench of the decoder controller. Frames are started with chosen
// syndrome outcomes per iteration (syn_any driven during the CV cycles of
// "failing" iterations). Checked: the VC schedule (row groups 0..5 in the
// first six cycles of each 12-cycle iteration, nothing in the 6 stall
// cycles), the R/CV/PS control words as 1/5/6-cycle delays of the VC word,
// the tag and bias flags in iterations max_iter and max_iter+1, the frame
// length 1 + 12*iterations (+ cycles held by out_ready), and the converged
// flag and iteration count at done.
module tb_decoder_ctrl;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, out_ready, pp_en, et_en, syn_any;
  logic [ITER_W-1:0] max_iter;
  logic load, busy, done, converged, use_snap, pp_used;
  logic [ITER_W-1:0] iters;
  stage_ctl_t vc_ctl, r_ctl, cv_ctl, ps_ctl;
  decoder_ctrl dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  stage_ctl_t hist [$];
  int cur_it = 0;          // iteration seen at the CV stage
  int fail_until = 0;      // iterations 1..fail_until report failed checks
  int vc_pos = 0;          // cycle within iteration, from the testbench's count
  bit running = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive syn_any from the CV control word
  always_comb syn_any = cv_ctl.en && (cur_it <= fail_until) && (cv_ctl.k == 3'd2);

  always @(posedge clk) if (rst_n) begin
    cyc++;
    hist.push_front(vc_ctl);
    if (hist.size() > 7) void'(hist.pop_back());
    if (hist.size() == 7) begin
      checks++;
      if (r_ctl !== hist[1] || cv_ctl !== hist[5] || ps_ctl !== hist[6]) begin
        failures++; $display("stage delay mismatch at %0d", cyc);
      end
    end
    if (cv_ctl.en && cv_ctl.k == 0) cur_it++;
    if (running) begin
      checks++;
      if (vc_pos < 6) begin
        if (!(vc_ctl.en && vc_ctl.k == rg_t'(vc_pos))) begin failures++; $display("vc missing at pos %0d", vc_pos); end
        else if (vc_ctl.tag != (pp_en && (cur_it + 1 == int'(max_iter))) && vc_pos == 0) begin
          // cur_it counts CV starts, one iteration behind the VC stage at pos 0
          failures++; $display("tag flag wrong it=%0d", cur_it + 1);
        end
      end else if (vc_ctl.en) begin failures++; $display("vc during stall pos %0d", vc_pos); end
      vc_pos = (vc_pos + 1) % 12;
    end
  end

  task automatic frame(int mi, bit pp, bit et, int nfail, int hold,
                       int exp_iters, bit exp_conv);
    int t0, t1, run_its, n_bias, n_held;
    max_iter = ITER_W'(mi); pp_en = pp; et_en = et; fail_until = nfail;
    out_ready = (hold == 0);
    cur_it = 0; n_bias = 0; n_held = 0;
    start = 1;
    do @(posedge clk); while (!load);
    t0 = cyc;
    #1 start = 0;
    running = 1; vc_pos = 0;
    fork
      begin
        if (hold > 0) begin
          while (dut.state != 2'd2) @(posedge clk);
          repeat (hold) @(posedge clk);
          #1 out_ready = 1;
        end
      end
      begin
        do begin
          @(posedge clk);
          if (vc_ctl.bias && vc_ctl.en) n_bias++;
          if (dut.state == 2'd2) running = 0;
          if (dut.state == 2'd2 && !out_ready) n_held++;
        end while (!done);
      end
    join
    t1 = cyc;
    running = 0;
    run_its = exp_conv ? exp_iters + 1 : exp_iters;
    checks += 6;
    if (t1 - t0 != 12*run_its + n_held + 1) begin failures++; $display("frame length %0d exp %0d", t1 - t0, 12*run_its + n_held + 1); end
    if (hold > 0 && n_held < hold) begin failures++; $display("output hold not seen"); end
    if (converged != exp_conv) begin failures++; $display("converged %0d exp %0d", converged, exp_conv); end
    if (int'(iters) != exp_iters) begin failures++; $display("iters %0d exp %0d", iters, exp_iters); end
    if (pp_used != (pp && run_its > mi - 1 && run_its >= mi)) begin failures++; $display("pp_used %0d", pp_used); end
    if (n_bias != ((pp && run_its > mi) ? 6 : 0)) begin failures++; $display("bias cycles %0d", n_bias); end
    @(posedge clk);
    @(negedge clk);
  endtask

  initial begin
    start = 0; out_ready = 1; pp_en = 0; et_en = 1; max_iter = 8;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    frame(8, 0, 1, 2, 0, 2, 1);   // converges: iteration 3 sees a clean syndrome
    frame(8, 1, 1, 0, 0, 0, 1);   // prior already a codeword
    frame(3, 1, 1, 99, 0, 7, 0);  // never converges: 3 regular + 4 post-processing
    frame(2, 0, 0, 0, 4, 2, 0);   // no early termination, output held 4 cycles
    frame(4, 1, 1, 4, 0, 4, 1);   // converges in the biasing iteration
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
