// Input frame buffer.
//
// Collects one frame of prior LLRs, one column group (64 LLRs) per accepted
// beat, NCG beats per frame, and presents the whole frame in parallel to the
// decoder. The frame is held until the decoder loads it (take), which copies
// it into the VNs' prior memories in one cycle, so the next frame can be
// filling while the current one is decoded. Beat i fills bits 64*i..64*i+63.
// Handshake: in_valid/in_ready, a beat is accepted when both are high;
// in_ready is low while a complete frame waits. take must only be asserted
// while frame_valid is high.
module input_buffer
  import ldpc_pkg::*;
#(
  parameter int NCG = N_CG
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  llr_t in_llr [Z],
  output logic frame_valid,
  output llr_t frame_llr [Z*NCG],
  input  logic take
);

  localparam int CW = $clog2(NCG + 1);
  logic [CW-1:0] cnt;

  assign frame_valid = (cnt == CW'(NCG));
  assign in_ready    = !frame_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      frame_llr <= '{default: '0};
    end else begin
      if (in_valid && in_ready) begin
        for (int v = 0; v < Z; v++) frame_llr[int'(cnt)*Z + v] <= in_llr[v];
        cnt <= cnt + 1'b1;
      end else if (take) begin
        cnt <= '0;
      end
    end
  end

  a_take_valid: assert property (@(posedge clk) disable iff (!rst_n) take |-> frame_valid);

endmodule
