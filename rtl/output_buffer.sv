// Output frame buffer.
//
// Captures a decoded frame (all hard decisions, the converged flag and the
// iteration count) in one cycle when the decoder finishes, and streams it
// out one column group (64 bits) per beat, NCG beats, with out_last on the
// final beat. empty tells the decoder that a finished frame can be handed
// over; while a frame is still being streamed the decoder holds its result.
// Handshake: out_valid/out_ready; capture must only be asserted when empty.
module output_buffer
  import ldpc_pkg::*;
#(
  parameter int NCG = N_CG
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              capture,
  input  logic [Z*NCG-1:0]  bits_in,
  input  logic              conv_in,
  input  logic [ITER_W-1:0] iters_in,
  output logic              empty,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [Z-1:0]      out_bits,
  output logic              out_last,
  output logic              out_converged,
  output logic [ITER_W-1:0] out_iters
);

  localparam int CW = $clog2(NCG + 1);
  logic [Z*NCG-1:0] buf_q;
  logic [CW-1:0]    left;          // beats still to send

  assign empty     = (left == '0);
  assign out_valid = !empty;
  assign out_bits  = buf_q[Z-1:0];
  assign out_last  = (left == CW'(1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buf_q         <= '0;
      left          <= '0;
      out_converged <= 1'b0;
      out_iters     <= '0;
    end else if (capture) begin
      buf_q         <= bits_in;
      left          <= CW'(NCG);
      out_converged <= conv_in;
      out_iters     <= iters_in;
    end else if (out_valid && out_ready) begin
      buf_q <= buf_q >> Z;
      left  <= left - 1'b1;
    end
  end

  a_capture_empty: assert property (@(posedge clk) disable iff (!rst_n) capture |-> empty);

endmodule
