// cmm_pkg: types, default sizes and helper functions shared by the CMM-MSD
// modular exponentiation datapath.
//
// Signed digits from the canonical (non-adjacent form) recoding are carried as
// a 2-bit code: 00 = 0, 01 = +1, 11 = -1. One step of the M4 multiplier is
// driven by an MCR pair: a zero count k (0..KMAX) and the digit that follows
// the zero run. A pair whose digit is zero stands for k+1 zero digits; it is
// used when a zero run is longer than the shifter limit and to pad the top of
// the multiplier, so that every multiplication shifts by the same total.
package cmm_pkg;

  // Operand width n and exponent width k. The algorithm is given for
  // arbitrary "large integers"; 1024 bits is the RSA size used here.
  localparam int unsigned NB_DEFAULT   = 1024;
  localparam int unsigned EB_DEFAULT   = 1024;
  // Longest zero run handled in one multiplication step (shifter limit).
  localparam int unsigned KMAX_DEFAULT = 6;
  // Width of the zero-count field of a pair; supports KMAX up to 14.
  localparam int unsigned KW = 4;

  typedef enum logic [1:0] {
    SD_ZERO = 2'b00,
    SD_POS  = 2'b01,
    SD_NEG  = 2'b11
  } sd_t;

  typedef struct packed {
    logic [KW-1:0] k;     // zeros below the digit
    sd_t           z;     // digit at position k (SD_ZERO: k+1 zeros only)
    logic          last;  // final pair of the multiplier
  } mcr_pair_t;

  // -m^-1 mod 2^16 for odd m (bit-by-bit Hensel lifting). Callers keep the
  // low bits they need.
  function automatic logic [15:0] neg_inv16(input logic [15:0] m);
    logic [15:0] inv;
    logic [15:0] prod;
    inv = 16'd1;
    for (int i = 1; i < 16; i++) begin
      prod = m * inv;
      if (prod[i]) inv[i] = 1'b1;
    end
    return 16'(~inv + 16'd1);
  endfunction

endpackage
