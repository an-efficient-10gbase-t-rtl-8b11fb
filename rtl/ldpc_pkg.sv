// Shared constants, message types and code-structure functions for the
// grouped-parallel (2048,1723) RS-LDPC offset min-sum decoder.
//
// Code structure: the parity-check matrix H is 6 row groups by 32 column
// groups of 64x64 permutation submatrices (384 checks, 2048 bits, every bit
// in 6 checks, every check over 32 bits). The submatrix in row group k and
// column group c connects check r of the row group to bit
//     v = r XOR s(k,c),   s(k,c) = alpha^((k + c) mod 63)  in GF(2^6),
// with alpha a root of x^6 + x + 1. This is the Reed-Solomon location-vector
// construction (a two-dimensional RS code over GF(2^6) evaluated at 32 points,
// six cosets of its one-dimensional subcode); the particular coset leaders
// and evaluation points are this design's choice. Any two checks of different
// row groups share at most one bit, so the graph has no 4-cycles, and every
// check has even weight, so all-zeros and all-ones are codewords.
//
// Number formats (4-bit wordlength):
//   llr_t   prior LLR, two's complement, -7..+7 (positive means bit 0)
//   c2v     check-to-variable message, two's complement, -7..+7
//   v2c_t   variable-to-check message in sign-magnitude (3-bit magnitude)
//           plus the variable node's current hard decision
//   cn_out_t  what a check node broadcasts: min1, min2, sign product and
//           the parity of the hard decisions (used for early termination)
package ldpc_pkg;

  localparam int Z       = 64;          // submatrix size (VNs per VNG, CNs in the CNG)
  localparam int N_CG    = 32;          // column groups = VNGs
  localparam int N_RG    = 6;           // row groups = column weight
  localparam int N_BITS  = Z * N_CG;    // 2048
  localparam int N_CHK   = Z * N_RG;    // 384
  localparam int MSG_W   = 4;           // message wordlength
  localparam int MAG_W   = MSG_W - 1;   // magnitude bits
  localparam int PS_W    = 6;           // posterior LLR accumulator width
  localparam int MAG_MAX = (1 << MAG_W) - 1;
  localparam int ITER_W  = 6;           // iteration counter / limit width
  localparam int ITERS_PER_STAGE = 12;  // 6 issue cycles + 6 stall cycles

  typedef logic signed [MSG_W-1:0] llr_t;
  typedef logic signed [MSG_W-1:0] c2v_t;
  typedef logic signed [PS_W-1:0]  post_t;
  typedef logic [MAG_W-1:0]        mag_t;
  typedef logic [2:0]              rg_t;     // row group index 0..5

  typedef struct packed {
    logic sgn;
    mag_t mag;
    logic hd;
  } v2c_t;

  typedef struct packed {
    mag_t min1;
    mag_t min2;
    logic prd;
    logic syn;
  } cn_out_t;

  // Per-stage control word issued by the controller and delayed along the
  // pipeline: en = a row-group operation occupies this stage, k = its row
  // group, tag = pre-biasing iteration, bias = biasing iteration.
  typedef struct packed {
    logic en;
    rg_t  k;
    logic tag;
    logic bias;
  } stage_ctl_t;

  // alpha^e in GF(2^6), primitive polynomial x^6 + x + 1
  function automatic logic [5:0] gf_alpha_pow(int e);
    logic [5:0] a;
    a = 6'd1;
    for (int i = 0; i < (e % 63); i++)
      a = a[5] ? {a[4:0], 1'b0} ^ 6'b000011 : {a[4:0], 1'b0};
    return a;
  endfunction

  // Offset of the permutation submatrix in row group k, column group c.
  function automatic logic [5:0] perm_off(int k, int c);
    return gf_alpha_pow((k + c) % 63);
  endfunction

endpackage
