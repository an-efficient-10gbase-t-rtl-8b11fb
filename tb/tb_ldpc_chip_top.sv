// End-to-end testbench of the decoder chip, built with 8 of the 32 column
// groups (512-bit code) for speed.
// Part 1, external frames: noisy frames are streamed in beat by beat with
// gaps, decoded frames are read out with a random out_ready, and every
// decoded bit, the converged flag and the iteration count are compared with
// the behavioural reference decoder (ldpc_ref_pkg).
// Part 2, automated test: the on-chip noise generator feeds frames of the
// all-ones codeword; the testbench captures each generated frame at the
// input buffer, decodes it with the reference, and compares the chip's
// frame, bit-error, frame-error and undetected-error counters.
// Mechanisms counted (each must occur): early termination, iteration limit,
// post-processing, decoder held by a busy output buffer, input refused while
// the input buffer is full, automated frames.
module tb_ldpc_chip_top;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  localparam int NCG = 8;
  localparam int NB  = Z * NCG;
  localparam int N_EXT  = 6;
  localparam int N_AUTO = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [ITER_W-1:0] max_iter, out_iters;
  logic pp_en, et_en, auto_mode, cfg_send_one, auto_start;
  logic [11:0] cfg_sigma, cfg_llr_scale;
  logic [31:0] auto_frames;
  logic in_valid, in_ready, out_valid, out_ready, out_last, out_converged;
  llr_t in_llr [Z];
  logic [Z-1:0] out_bits;
  logic dec_busy, auto_busy;
  logic [47:0] frames_done, bit_errors, frame_errors, undetected;

  ldpc_chip_top #(.NCG(NCG)) dut (.*);

  int checks = 0, failures = 0;
  int n_et = 0, n_limit = 0, n_pp = 0, n_hold = 0, n_full = 0, n_auto = 0;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    if (dut.u_dec.u_ctrl.state == 2'd2 && !dut.u_dec.out_ready) n_hold++;
    if (in_valid && !in_ready) n_full++;
    if (dut.u_dec.done) begin
      if (dut.u_dec.converged) n_et++; else n_limit++;
      if (dut.u_dec.pp_used) n_pp++;
    end
  end

  // expected results of the external frames, in order
  bit     exp_bits [N_EXT][NB];
  bit     exp_conv [N_EXT];
  int     exp_iters [N_EXT];
  real    sig [N_EXT] = '{0.5, 0.6, 1.3, 0.55, 0.75, 1.2};

  task automatic send_frames();
    for (int f = 0; f < N_EXT; f++) begin
      for (int b = 0; b < NB; b++) ref_prior[b] = ref_channel_llr(f[0], sig[f], 2.5);
      ref_decode(NCG, 8, 1, 1, 4, 1, 1);
      for (int b = 0; b < NB; b++) exp_bits[f][b] = ref_bits[b];
      exp_conv[f] = ref_conv; exp_iters[f] = ref_iters;
      for (int beat = 0; beat < NCG; beat++) begin
        @(negedge clk);
        while ($urandom % 5 == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        foreach (in_llr[i]) in_llr[i] = llr_t'(ref_prior[beat*Z + i]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
      @(negedge clk) in_valid = 0;
    end
  endtask

  task automatic recv_frames();
    for (int f = 0; f < N_EXT; f++) begin
      int bad;
      bad = 0;
      for (int beat = 0; beat < NCG; beat++) begin
        @(negedge clk);
        out_ready = (f < 2) ? 1'b0 : 1'($urandom % 3 != 0);
        if (f < 2 && beat == 0) repeat (150) @(negedge clk);  // slow reader
        out_ready = 1;
        @(posedge clk);
        while (!out_valid) @(posedge clk);
        for (int i = 0; i < Z; i++) if (out_bits[i] != exp_bits[f][beat*Z + i]) bad++;
        checks++;
        if (out_last != (beat == NCG - 1)) begin failures++; $display("out_last wrong"); end
        if (beat == 0) begin
          checks += 2;
          if (out_converged != exp_conv[f]) begin failures++; $display("frame %0d converged %0d exp %0d", f, out_converged, exp_conv[f]); end
          if (int'(out_iters) != exp_iters[f]) begin failures++; $display("frame %0d iters %0d exp %0d", f, out_iters, exp_iters[f]); end
        end
      end
      @(negedge clk) out_ready = 0;
      checks++;
      if (bad) begin failures++; $display("frame %0d: %0d bits differ", f, bad); end
      else $display("external frame %0d ok (iters %0d, converged %0d)", f, exp_iters[f], exp_conv[f]);
    end
  endtask

  // automated mode: capture generated frames at the input buffer
  longint e_be = 0, e_fe = 0, e_ud = 0;
  int     cap_beat = 0, cap_frames = 0;
  always @(posedge clk) if (rst_n && auto_mode && dut.ib_valid_in && dut.ib_ready) begin
    for (int i = 0; i < Z; i++) ref_prior[cap_beat*Z + i] = int'(dut.ib_llr_in[i]);
    cap_beat++;
    if (cap_beat == NCG) begin
      int errs;
      cap_beat = 0;
      cap_frames++;
      ref_decode(NCG, 8, 1, 1, 4, 1, 1);
      errs = 0;
      for (int b = 0; b < NB; b++) if (ref_bits[b] != 1'b1) errs++;
      e_be += errs;
      if (errs) begin e_fe++; if (ref_conv) e_ud++; end
    end
  end

  initial begin
    max_iter = 8; pp_en = 1; et_en = 1; auto_mode = 0; cfg_send_one = 0; auto_start = 0;
    cfg_sigma = '0; cfg_llr_scale = '0; auto_frames = '0;
    in_valid = 0; out_ready = 0;
    foreach (in_llr[i]) in_llr[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    fork
      send_frames();
      recv_frames();
    join
    // automated test: all-ones codeword, sigma 1.0 (12'd256), LLR scale 2.0
    repeat (5) @(negedge clk);
    auto_mode = 1; cfg_send_one = 1; cfg_sigma = 12'd205; cfg_llr_scale = 12'd640;
    auto_frames = N_AUTO;
    @(negedge clk) auto_start = 1;
    @(negedge clk) auto_start = 0;
    @(negedge clk);
    while (auto_busy) @(negedge clk);
    repeat (3) @(negedge clk);
    n_auto = cap_frames;
    checks += 4;
    if (frames_done != 48'(N_AUTO) || cap_frames != N_AUTO) begin failures++; $display("frames %0d captured %0d", frames_done, cap_frames); end
    if (bit_errors != 48'(e_be)) begin failures++; $display("bit errors %0d exp %0d", bit_errors, e_be); end
    if (frame_errors != 48'(e_fe)) begin failures++; $display("frame errors %0d exp %0d", frame_errors, e_fe); end
    if (undetected != 48'(e_ud)) begin failures++; $display("undetected %0d exp %0d", undetected, e_ud); end
    $display("automated: frames %0d bit errors %0d frame errors %0d undetected %0d", frames_done, bit_errors, frame_errors, undetected);
    checks++;
    if (n_et == 0 || n_limit == 0 || n_pp == 0 || n_hold == 0 || n_full == 0 || n_auto == 0) begin
      failures++;
    end
    $display("mechanisms: early_termination=%0d iteration_limit=%0d post_processing=%0d output_hold_cycles=%0d input_full_cycles=%0d automated_frames=%0d",
             n_et, n_limit, n_pp, n_hold, n_full, n_auto);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
