// Error collection for automated testing.
//
// With the all-zeros or all-ones codeword transmitted, every decoded frame
// is compared with the expected codeword when frame_valid pulses: the number
// of wrong bits is added to the bit-error counter, a frame with any wrong
// bit counts as a frame error, and a frame the decoder reported as a
// verified codeword (converged) that still differs from the transmitted one
// counts as an undetected error. clear zeroes all counters.
// Timing: counters update on the clock edge after frame_valid.
module error_counter
  import ldpc_pkg::*;
#(
  parameter int NB  = N_BITS,
  parameter int CNT_W = 48
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             frame_valid,
  input  logic [NB-1:0]    bits,
  input  logic             expect_one,
  input  logic             converged,
  output logic [CNT_W-1:0] frames,
  output logic [CNT_W-1:0] bit_errors,
  output logic [CNT_W-1:0] frame_errors,
  output logic [CNT_W-1:0] undetected
);

  localparam int PW = $clog2(NB + 1);
  logic [PW-1:0] nerr;

  always_comb begin
    nerr = '0;
    for (int i = 0; i < NB; i++) nerr += PW'(bits[i] ^ expect_one);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      frames       <= '0;
      bit_errors   <= '0;
      frame_errors <= '0;
      undetected   <= '0;
    end else if (frame_valid) begin
      frames     <= frames + 1'b1;
      bit_errors <= bit_errors + CNT_W'(nerr);
      if (nerr != '0) begin
        frame_errors <= frame_errors + 1'b1;
        if (converged) undetected <= undetected + 1'b1;
      end
    end
  end

endmodule
