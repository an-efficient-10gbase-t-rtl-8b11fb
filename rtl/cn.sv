// Check node (CN): offset min-sum check update, first half.
//
// A compare-select tree finds, over the 32 incoming variable-to-check
// messages (one per VNG), the smallest magnitude min1, the second smallest
// min2 (min2 >= min1; equal when the minimum occurs twice) and the XOR of the
// signs, prd (1 = check unsatisfied by the message signs). It also forms syn,
// the XOR of the senders' hard decisions, used for early termination.
// Structure: the 32 inputs are sorted in pairs, then four levels of 4-to-2
// compare-select merge (min1,min2) pairs 16 -> 8 -> 4 -> 2 -> 1.
// Pipelining (three stages, latency 3 cycles, one operation per cycle):
//   CS1: pair sort and first 4-to-2 level      -> register
//   CS2: second and third 4-to-2 levels        -> register
//   CS3: final 4-to-2 level                    -> output register (fan-out)
// The pairing, the four 4-to-2 levels and the stage split follow the
// published design.
module cn
  import ldpc_pkg::*;
#(
  parameter int N_IN = N_CG          // check degree, 32; a power of two >= 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  v2c_t    msg_in [N_IN],
  output cn_out_t cn_out
);

  typedef struct packed {
    mag_t m1;
    mag_t m2;
  } mm_t;

  function automatic mm_t cs42(mm_t a, mm_t b);
    mm_t o;
    if (a.m1 <= b.m1) begin
      o.m1 = a.m1;
      o.m2 = (a.m2 <= b.m1) ? a.m2 : b.m1;
    end else begin
      o.m1 = b.m1;
      o.m2 = (b.m2 <= a.m1) ? b.m2 : a.m1;
    end
    return o;
  endfunction

  // Tree shape: CS1 leaves N_IN/4 pairs, CS2 merges two more levels (fewer
  // for small N_IN), CS3 merges the rest (one level for N_IN = 32).
  localparam int L1 = N_IN / 4;
  localparam int N2 = (L1 >= 4) ? 2 : ((L1 >= 2) ? 1 : 0);
  localparam int L3 = L1 >> N2;
  localparam int N3 = $clog2(L3);

  mm_t  s1_c [L1], s1_q [L1];
  mm_t  s2_c [L3], s2_q [L3];
  logic prd_c, syn_c, prd1_q, syn1_q, prd2_q, syn2_q;

  // CS1
  always_comb begin
    mm_t p [N_IN/2];
    for (int i = 0; i < N_IN/2; i++) begin
      if (msg_in[2*i].mag <= msg_in[2*i+1].mag) p[i] = '{msg_in[2*i].mag,   msg_in[2*i+1].mag};
      else                                      p[i] = '{msg_in[2*i+1].mag, msg_in[2*i].mag};
    end
    for (int i = 0; i < L1; i++) s1_c[i] = cs42(p[2*i], p[2*i+1]);
    prd_c = 1'b0;
    syn_c = 1'b0;
    for (int i = 0; i < N_IN; i++) begin
      prd_c ^= msg_in[i].sgn;
      syn_c ^= msg_in[i].hd;
    end
  end

  // CS2
  always_comb begin
    mm_t t [L1];
    t = s1_q;
    for (int l = 0; l < N2; l++)
      for (int i = 0; i < (L1 >> (l + 1)); i++) t[i] = cs42(t[2*i], t[2*i+1]);
    for (int i = 0; i < L3; i++) s2_c[i] = t[i];
  end

  // CS3
  mm_t fin;
  always_comb begin
    mm_t t [L3];
    t = s2_q;
    for (int l = 0; l < N3; l++)
      for (int i = 0; i < (L3 >> (l + 1)); i++) t[i] = cs42(t[2*i], t[2*i+1]);
    fin = t[0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_q   <= '{default: '0};
      s2_q   <= '{default: '0};
      prd1_q <= 1'b0;
      syn1_q <= 1'b0;
      prd2_q <= 1'b0;
      syn2_q <= 1'b0;
      cn_out <= '0;
    end else begin
      s1_q   <= s1_c;
      prd1_q <= prd_c;
      syn1_q <= syn_c;
      s2_q   <= s2_c;
      prd2_q <= prd1_q;
      syn2_q <= syn1_q;
      cn_out <= '{min1: fin.m1, min2: fin.m2, prd: prd2_q, syn: syn2_q};
    end
  end

endmodule
