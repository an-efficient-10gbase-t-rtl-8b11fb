// Testbench of the error counter: frames with a known number of flipped
// bits (including none and many) relative to the all-zeros or all-ones
// codeword, with and without the converged flag; the four counters are
// compared with totals kept in the testbench, and clear is checked.
module tb_error_counter;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, frame_valid, expect_one, converged;
  logic [N_BITS-1:0] bits;
  logic [47:0] frames, bit_errors, frame_errors, undetected;
  error_counter dut (.*);

  int checks = 0, failures = 0;
  longint e_fr = 0, e_be = 0, e_fe = 0, e_ud = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_counts();
    checks++;
    if (frames != 48'(e_fr) || bit_errors != 48'(e_be) || frame_errors != 48'(e_fe) || undetected != 48'(e_ud)) begin
      failures++;
      $display("counts %0d %0d %0d %0d exp %0d %0d %0d %0d", frames, bit_errors, frame_errors, undetected, e_fr, e_be, e_fe, e_ud);
    end
  endtask

  initial begin
    clear = 0; frame_valid = 0; expect_one = 0; converged = 0; bits = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int fr = 0; fr < 60; fr++) begin
      int nflip, actual;
      @(negedge clk);
      expect_one = 1'($urandom);
      converged  = 1'($urandom);
      nflip = (fr % 4 == 0) ? 0 : ((fr % 7 == 0) ? 1500 : int'($urandom % 40));
      bits = expect_one ? '1 : '0;
      for (int i = 0; i < nflip; i++) bits[$urandom % N_BITS] ^= 1'b1;
      actual = 0;
      for (int i = 0; i < N_BITS; i++) if (bits[i] != expect_one) actual++;
      frame_valid = 1;
      @(negedge clk);
      frame_valid = 0;
      e_fr++; e_be += actual;
      if (actual) begin e_fe++; if (converged) e_ud++; end
      @(negedge clk);   // counters ignore cycles without frame_valid
      check_counts();
      if (fr == 30) begin
        clear = 1; @(negedge clk); clear = 0;
        e_fr = 0; e_be = 0; e_fe = 0; e_ud = 0;
        check_counts();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
