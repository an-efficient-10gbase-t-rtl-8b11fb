// Decoder controller: iteration schedule, pipeline stalls, post-processing
// phases and early termination.
//
// An iteration is 12 cycles: in cycles 0..5 one row group per cycle enters
// the VC stage; cycles 6..11 are the stall that lets the last row group's
// posterior update (PS stage, 6 cycles after VC) finish before the next
// iteration reads the posterior. The control word issued to the VC stage is
// delayed by 1, 5 and 6 cycles for the R, CV and PS stages.
//
// Iteration it (1-based) also checks the syndrome of the hard decisions
// left by iteration it-1: the CNs XOR the hard decisions and the CV-cycle
// syn_any flags are ORed over the six row groups. If early termination is
// enabled and no check failed, the frame ends with those decisions
// (converged = 1, iterations = it-1). Otherwise regular decoding runs up to
// max_iter iterations. With post-processing enabled, iteration max_iter is
// also the pre-biasing (tagging) iteration, iteration max_iter+1 the biasing
// iteration, and PP_ITER-1 follow-up iterations of regular decoding follow.
// When the last iteration ends without a verified codeword the frame ends
// with the current hard decisions (converged = 0).
//
// Frame handshake: load is asserted for one cycle when start (a frame waits
// in the input buffer) is seen in IDLE or at the end of a frame. A finished
// frame is held (state FIN) until out_ready; done is a one-cycle pulse with
// converged/use_snap/iters valid, and the decoder's hard-decision outputs are
// valid in that cycle. A new frame may load in the same cycle as done.
module decoder_ctrl
  import ldpc_pkg::*;
#(
  parameter int PP_ITER = 4        // post-processing iterations (biasing + follow-up)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              out_ready,
  input  logic [ITER_W-1:0] max_iter,    // regular iteration limit, >= 1
  input  logic              pp_en,
  input  logic              et_en,
  input  logic              syn_any,
  output logic              load,
  output stage_ctl_t        vc_ctl,
  output stage_ctl_t        r_ctl,
  output stage_ctl_t        cv_ctl,
  output stage_ctl_t        ps_ctl,
  output logic              busy,
  output logic              done,
  output logic              converged,
  output logic              use_snap,    // result is hd_snap (else hd)
  output logic [ITER_W-1:0] iters,       // iterations the result took
  output logic              pp_used      // post-processing phase was entered
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FIN} state_t;

  state_t            state;
  logic [3:0]        cyc;
  logic [ITER_W-1:0] it;
  logic              unsat;
  logic              res_conv;
  logic [ITER_W-1:0] res_iters;
  logic              pp_seen;
  stage_ctl_t        dly [6];      // dly[i] = VC control word i+1 cycles ago

  logic [ITER_W:0]   limit;
  logic              end_iter, conv_now, last_now;

  assign limit    = {1'b0, max_iter} + (pp_en ? (ITER_W+1)'(PP_ITER) : '0);
  assign end_iter = (state == S_RUN) && (cyc == 4'd11);
  assign conv_now = et_en && !unsat;
  assign last_now = ({1'b0, it} >= limit);

  always_comb begin
    vc_ctl      = '0;
    vc_ctl.en   = (state == S_RUN) && (cyc < 4'd6);
    vc_ctl.k    = rg_t'(cyc);
    vc_ctl.tag  = pp_en && (it == max_iter);
    vc_ctl.bias = pp_en && ({1'b0, it} == {1'b0, max_iter} + 1'b1);
    if (!vc_ctl.en) vc_ctl = '0;
  end

  assign r_ctl  = dly[0];
  assign cv_ctl = dly[4];
  assign ps_ctl = dly[5];

  assign done      = (state == S_FIN) && out_ready;
  assign load      = start && ((state == S_IDLE) || done);
  assign busy      = (state != S_IDLE);
  assign converged = res_conv;
  assign use_snap  = res_conv;
  assign iters     = res_iters;
  assign pp_used   = pp_seen;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cyc       <= '0;
      it        <= '0;
      unsat     <= 1'b0;
      res_conv  <= 1'b0;
      res_iters <= '0;
      pp_seen   <= 1'b0;
      dly       <= '{default: '0};
    end else begin
      dly[0] <= vc_ctl;
      for (int i = 1; i < 6; i++) dly[i] <= dly[i-1];

      if (cv_ctl.en && syn_any) unsat <= 1'b1;

      unique case (state)
        S_IDLE, S_FIN: begin
          if (load) begin
            state   <= S_RUN;
            cyc     <= '0;
            it      <= ITER_W'(1);
            unsat   <= 1'b0;
            pp_seen <= 1'b0;
          end else if (done) begin
            state <= S_IDLE;
          end
        end
        S_RUN: begin
          if (vc_ctl.en && (vc_ctl.tag || vc_ctl.bias)) pp_seen <= 1'b1;
          if (end_iter) begin
            unsat <= 1'b0;
            if (conv_now || last_now) begin
              state     <= S_FIN;
              res_conv  <= conv_now;
              res_iters <= conv_now ? it - 1'b1 : it;
            end else begin
              it  <= it + 1'b1;
              cyc <= '0;
            end
          end else begin
            cyc <= cyc + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The pipeline must be empty when a frame ends or a new one loads.
  property p_load_when_drained;
    @(posedge clk) disable iff (!rst_n) load |-> !(dly[0].en || dly[1].en || dly[2].en
                                                 || dly[3].en || dly[4].en || dly[5].en);
  endproperty
  a_load_when_drained: assert property (p_load_when_drained);

endmodule
