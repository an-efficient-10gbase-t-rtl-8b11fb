// Testbench of the output frame buffer: random frames are captured and
// drained with a random out_ready; each beat must carry the next 64 bits,
// out_last must mark the last beat, the frame's flags must be held, and
// empty must rise only after the last beat.
module tb_output_buffer;
  import ldpc_pkg::*;
  localparam int NCG = N_CG;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic capture, conv_in, empty, out_valid, out_ready, out_last, out_converged;
  logic [Z*NCG-1:0] bits_in;
  logic [ITER_W-1:0] iters_in, out_iters;
  logic [Z-1:0] out_bits;
  output_buffer dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    capture = 0; conv_in = 0; out_ready = 0; bits_in = '0; iters_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int fr = 0; fr < 6; fr++) begin
      logic [Z*NCG-1:0] f;
      int b;
      @(negedge clk);
      checks++;
      if (!empty || out_valid) begin failures++; $display("not empty before capture"); end
      for (int i = 0; i < Z*NCG; i += 32) f[i +: 32] = $urandom;
      bits_in = f; conv_in = fr[0]; iters_in = ITER_W'(fr + 3);
      capture = 1;
      @(negedge clk);
      capture = 0; bits_in = '0;
      b = 0;
      while (b < NCG) begin
        out_ready = ($urandom % 3 != 0);
        checks += 4;
        if (!out_valid) begin failures++; $display("no data at beat %0d", b); end
        if (out_bits !== f[b*Z +: Z]) begin failures++; $display("fr%0d beat %0d data", fr, b); end
        if (out_last != (b == NCG - 1)) begin failures++; $display("last flag beat %0d", b); end
        if (out_converged != fr[0] || out_iters != ITER_W'(fr + 3)) begin failures++; $display("flags"); end
        @(negedge clk);
        if (out_ready) b++;
      end
      out_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
