// On-chip AWGN channel emulator for automated testing.
//
// Produces LANES channel LLRs per cycle for the all-zeros or all-ones
// codeword sent over a BPSK/AWGN channel. Each lane has its own 32-bit
// xorshift uniform generator. Unit Gaussian noise comes from the Box-Muller
// transform n = sqrt(-2 ln u1) * cos(2 pi u2), with both functions held in
// 2^UW-entry tables that are computed at elaboration time:
//   RAD[i] = round(256 * sqrt(-2 ln((i + 0.5) / 2^UW)))      (Q.8)
//   COS[i] = round(256 * cos(2 pi (i + 0.5) / 2^UW))          (Q.8, signed)
// The noise is scaled by the stored multiplier sigma (Q.8), added to the
// BPSK symbol (+1 for bit 0, -1 for bit 1), and the received value is scaled
// by llr_scale (Q.8, normally about 2/sigma^2 in LLR units), rounded and
// saturated to the 4-bit LLR range -7..+7.
// Timing: when en is high the generators step and llr/valid are registered
// one cycle later. The Box-Muller method and the stored SNR multiplier follow
// the published test setup; table size, generator and number formats are this
// design's choice.
module awgn_gen
  import ldpc_pkg::*;
#(
  parameter int          LANES = Z,
  parameter int          UW    = 8,             // table address bits
  parameter logic [31:0] SEED  = 32'h1234_5678
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        send_one,     // all-ones codeword
  input  logic [11:0] sigma,        // noise standard deviation, Q4.8
  input  logic [11:0] llr_scale,    // LLR per unit of received signal, Q4.8
  output logic        valid,
  output llr_t        llr [LANES]
);

  localparam int TN = 1 << UW;
  typedef logic        [11:0] rad_t;
  typedef logic signed [9:0]  cos_t;
  typedef rad_t rad_tab_t [TN];
  typedef cos_t cos_tab_t [TN];

  function automatic rad_tab_t mk_rad();
    rad_tab_t t;
    for (int i = 0; i < TN; i++)
      t[i] = rad_t'($rtoi($sqrt(-2.0 * $ln((real'(i) + 0.5) / real'(TN))) * 256.0 + 0.5));
    return t;
  endfunction

  function automatic cos_tab_t mk_cos();
    cos_tab_t t;
    real r;
    for (int i = 0; i < TN; i++) begin
      r = $cos(2.0 * 3.14159265358979 * (real'(i) + 0.5) / real'(TN)) * 256.0;
      t[i] = cos_t'((r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(-r + 0.5));
    end
    return t;
  endfunction

  localparam rad_tab_t RAD = mk_rad();
  localparam cos_tab_t COS = mk_cos();

  logic [31:0] st [LANES];
  llr_t        llr_c [LANES];

  function automatic logic [31:0] xorshift(logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic signed [35:0] n, ns, y, yl, lq;
      n   = 36'(signed'({1'b0, RAD[st[l][31 -: UW]]})) * 36'(COS[st[l][15 -: UW]]);   // Q.16
      ns  = (n >>> 8) * 36'(signed'({1'b0, sigma}));                                   // Q.16
      y   = (send_one ? -36'sd65536 : 36'sd65536) + ns;                                // Q.16
      yl  = (y >>> 8) * 36'(signed'({1'b0, llr_scale}));                               // Q.16
      lq  = (yl + 36'sd32768) >>> 16;
      llr_c[l] = (lq > 36'sd7) ? llr_t'(7) : ((lq < -36'sd7) ? llr_t'(-7) : llr_t'(lq));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) st[l] <= SEED ^ (32'(l + 1) * 32'h9E37_79B9);
      valid <= 1'b0;
      llr   <= '{default: '0};
    end else begin
      valid <= en;
      if (en) begin
        for (int l = 0; l < LANES; l++) st[l] <= xorshift(st[l]);
        llr <= llr_c;
      end
    end
  end

endmodule
