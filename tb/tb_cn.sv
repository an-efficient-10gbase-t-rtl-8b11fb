// Testbench of the check node: random message sets, one per cycle, are
// compared three cycles later with min1/min2/sign-product/hard-decision
// parity worked out by sorting in the testbench. Forced ties (two equal
// minima) and all-equal sets are included.
module tb_cn;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  v2c_t    msg_in [N_CG];
  cn_out_t cn_out;
  cn dut (.*);

  int checks = 0, failures = 0;
  cn_out_t expq [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cn_out_t model();
    cn_out_t e;
    int m [N_CG];
    e = '0;
    foreach (msg_in[i]) begin m[i] = msg_in[i].mag; e.prd ^= msg_in[i].sgn; e.syn ^= msg_in[i].hd; end
    m.sort();
    e.min1 = mag_t'(m[0]);
    e.min2 = mag_t'(m[1]);
    return e;
  endfunction

  initial begin
    foreach (msg_in[i]) msg_in[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      foreach (msg_in[i]) begin
        msg_in[i].sgn = 1'($urandom);
        msg_in[i].hd  = 1'($urandom);
        msg_in[i].mag = mag_t'((t % 4 == 0) ? 7 - ($urandom % 2) : $urandom);
      end
      if (t % 5 == 1) begin   // duplicate minimum
        msg_in[$urandom % N_CG].mag = 0;
        msg_in[$urandom % N_CG].mag = 0;
      end
      if (t == 7) foreach (msg_in[i]) msg_in[i].mag = 3;
      expq.push_back(model());
      if (t >= 3) begin
        cn_out_t e;
        e = expq.pop_front();
        checks++;
        if (cn_out !== e) begin
          failures++;
          $display("t=%0d got %p exp %p", t, cn_out, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
