// Decoder test chip: the 10GBASE-T LDPC decoder with its frame buffers and
// the on-chip test circuitry.
//
// Data path: input_buffer -> ldpc_decoder -> output_buffer. Frames enter as
// beats of 64 prior LLRs (one column group) and leave as beats of 64 decoded
// bits. The input buffer fills the next frame while the decoder works on the
// current one.
//
// Two input modes (auto_mode):
//  * external (0): frames come from the in_* stream and decoded frames leave
//    through the out_* stream; the decoder holds a finished frame while the
//    output buffer is still sending the previous one.
//  * automated test (1): after auto_start, awgn_gen produces auto_frames
//    noisy frames of the all-zeros or all-ones codeword (cfg_send_one) at the
//    SNR set by cfg_sigma and cfg_llr_scale. The error counter checks every
//    decoded frame against the codeword, and the output stream is not used.
//    frames_done, bit_errors, frame_errors and undetected can be polled; auto_busy
//    falls when all frames have been decoded.
// Configuration (registers on the test board): regular iteration limit
// max_iter, post-processing enable pp_en, early-termination enable et_en.
// The clock comes from outside.
module ldpc_chip_top
  import ldpc_pkg::*;
#(
  parameter int NCG     = N_CG,      // column groups: 32 for the 2048-bit code
  parameter int PP_ITER = 4,         // post-processing iterations
  parameter int CNT_W   = 48
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic [ITER_W-1:0] max_iter,
  input  logic              pp_en,
  input  logic              et_en,
  input  logic              auto_mode,
  input  logic              cfg_send_one,
  input  logic [11:0]       cfg_sigma,
  input  logic [11:0]       cfg_llr_scale,
  input  logic [31:0]       auto_frames,
  input  logic              auto_start,
  // external frame input
  input  logic              in_valid,
  output logic              in_ready,
  input  llr_t              in_llr [Z],
  // decoded frame output
  output logic              out_valid,
  input  logic              out_ready,
  output logic [Z-1:0]      out_bits,
  output logic              out_last,
  output logic              out_converged,
  output logic [ITER_W-1:0] out_iters,
  // status
  output logic              dec_busy,
  output logic              auto_busy,
  output logic [CNT_W-1:0]  frames_done,
  output logic [CNT_W-1:0]  bit_errors,
  output logic [CNT_W-1:0]  frame_errors,
  output logic [CNT_W-1:0]  undetected
);

  localparam int NB = Z * NCG;
  localparam int BW = $clog2(NCG);

  // ---------------- automated test source ----------------
  logic        gen_en, gen_valid;
  llr_t        gen_llr [Z];
  logic [31:0] frames_left;
  logic [BW:0] beat;               // beats of the frame being generated
  logic        ib_ready;

  // Generate a beat when the input buffer can take it next cycle: within a
  // frame beats stream back to back; the first beat of a frame waits until
  // the previous frame's last beat has been accepted.
  assign gen_en = auto_mode && (frames_left != '0) && ib_ready && !(gen_valid && beat == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      frames_left <= '0;
      beat        <= '0;
    end else if (auto_start) begin
      frames_left <= auto_frames;
      beat        <= '0;
    end else if (gen_en) begin
      if (beat == (BW+1)'(NCG - 1)) begin
        beat        <= '0;
        frames_left <= frames_left - 1'b1;
      end else begin
        beat <= beat + 1'b1;
      end
    end
  end

  awgn_gen #(.LANES(Z)) u_awgn (
    .clk, .rst_n,
    .en        (gen_en),
    .send_one  (cfg_send_one),
    .sigma     (cfg_sigma),
    .llr_scale (cfg_llr_scale),
    .valid     (gen_valid),
    .llr       (gen_llr)
  );

  // ---------------- input buffer ----------------
  logic ib_valid_in;
  llr_t ib_llr_in [Z];
  logic frame_valid, load;
  llr_t frame_llr [NB];

  assign ib_valid_in = auto_mode ? gen_valid : in_valid;
  assign ib_llr_in   = auto_mode ? gen_llr   : in_llr;
  assign in_ready    = !auto_mode && ib_ready;

  input_buffer #(.NCG(NCG)) u_ibuf (
    .clk, .rst_n,
    .in_valid    (ib_valid_in),
    .in_ready    (ib_ready),
    .in_llr      (ib_llr_in),
    .frame_valid (frame_valid),
    .frame_llr   (frame_llr),
    .take        (load)
  );

  // ---------------- decoder ----------------
  logic              done, converged, pp_used, ob_empty;
  logic [ITER_W-1:0] iters;
  logic [NB-1:0]     dec_bits;

  ldpc_decoder #(.NCG(NCG), .PP_ITER(PP_ITER)) u_dec (
    .clk, .rst_n,
    .start     (frame_valid),
    .prior     (frame_llr),
    .out_ready (auto_mode || ob_empty),
    .max_iter, .pp_en, .et_en,
    .load,
    .busy      (dec_busy),
    .done, .converged, .iters, .pp_used,
    .dec_bits
  );

  // ---------------- output buffer ----------------
  output_buffer #(.NCG(NCG)) u_obuf (
    .clk, .rst_n,
    .capture   (done && !auto_mode),
    .bits_in   (dec_bits),
    .conv_in   (converged),
    .iters_in  (iters),
    .empty     (ob_empty),
    .out_valid, .out_ready, .out_bits, .out_last, .out_converged, .out_iters
  );

  // ---------------- error collection ----------------
  error_counter #(.NB(NB), .CNT_W(CNT_W)) u_err (
    .clk, .rst_n,
    .clear       (auto_start),
    .frame_valid (done && auto_mode),
    .bits        (dec_bits),
    .expect_one  (cfg_send_one),
    .converged,
    .frames      (frames_done),
    .bit_errors, .frame_errors, .undetected
  );

  assign auto_busy = auto_mode && ((frames_left != '0) || gen_valid || frame_valid || dec_busy);

endmodule
