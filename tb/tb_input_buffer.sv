// Testbench of the input frame buffer: random beats with random gaps fill
// frames; in_ready must fall after the last beat of a frame, the parallel
// frame must equal the beats in order, and take must free the buffer.
module tb_input_buffer;
  import ldpc_pkg::*;
  localparam int NCG = N_CG;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, frame_valid, take;
  llr_t in_llr [Z];
  llr_t frame_llr [Z*NCG];
  input_buffer dut (.*);

  int checks = 0, failures = 0;
  llr_t sent [Z*NCG];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; take = 0;
    foreach (in_llr[i]) in_llr[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int fr = 0; fr < 5; fr++) begin
      int b;
      b = 0;
      while (b < NCG) begin
        @(negedge clk);
        in_valid = ($urandom % 4 != 0);
        foreach (in_llr[i]) in_llr[i] = llr_t'($urandom);
        checks++;
        if (!in_ready || frame_valid) begin failures++; $display("not ready at beat %0d", b); end
        if (in_valid) begin
          foreach (in_llr[i]) sent[b*Z + i] = in_llr[i];
          b++;
        end
      end
      @(negedge clk);
      in_valid = 1;        // a beat offered while full must be refused
      repeat (3) begin
        checks += 2;
        if (in_ready)     begin failures++; $display("ready while full"); end
        if (!frame_valid) begin failures++; $display("frame not valid"); end
        @(negedge clk);
      end
      in_valid = 0;
      for (int i = 0; i < Z*NCG; i++) begin
        checks++;
        if (frame_llr[i] !== sent[i]) begin failures++; $display("fr%0d llr %0d", fr, i); break; end
      end
      take = 1;
      @(negedge clk);
      take = 0;
      checks++;
      if (frame_valid || !in_ready) begin failures++; $display("take did not free the buffer"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
