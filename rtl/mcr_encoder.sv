// mcr_encoder: modified canonical recoding (MCR) of the multiplier, streamed
// as one (zero count, digit) pair per clock.
//
// On `load` the NB-bit multiplier x is canonically recoded (cr_recoder) into
// L = NB+1 signed digits, held in two digit registers (positive and negative
// digit masks). Each following cycle the lowest KMAX+1 digits are scanned:
// the first nonzero digit at offset j gives the pair (k = j, digit), and the
// digit registers move down by j+1 through a limited barrel shifter. If no
// nonzero digit lies within KMAX+1 positions the pair (k = KMAX, digit 0) is
// emitted and KMAX+1 zeros are consumed, so the shifter never needs more than
// KMAX+1. Near the top the scan stops at the L-th digit: the zeros above the
// leading digit are emitted as digit-0 pairs, so the pairs of every operand
// add up to exactly L digit positions. That keeps the Montgomery factor of
// every multiplication at 2^-L, which the exponentiation needs.
//
// The published encoder records zero counts up to the leading digit only; the
// padding to a fixed length and the digit-0 pair format are this design's.
//
// Interface: `load` takes x (one cycle). While `valid` is high `pair` holds
// the current pair; `adv` consumes it. `pair.last` marks the final pair. A
// load while pairs remain restarts the encoder.
module mcr_encoder
  import cmm_pkg::*;
#(
  parameter int unsigned NB   = NB_DEFAULT,
  parameter int unsigned KMAX = KMAX_DEFAULT,
  localparam int unsigned L   = NB + 1,
  localparam int unsigned RW  = $clog2(L + 1),
  localparam int unsigned SW  = $clog2(KMAX + 2)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      load,
  input  logic [NB-1:0] x,
  input  logic      adv,
  output logic      valid,
  output mcr_pair_t pair
);

  logic [L-1:0]  dpos_q, dneg_q;
  logic [L-1:0]  dpos_rc, dneg_rc;
  logic [L-1:0]  dpos_sh, dneg_sh;
  logic [RW-1:0] rem_q;
  logic [SW-1:0] shamt;

  cr_recoder #(.W(NB)) u_cr (.x(x), .dpos(dpos_rc), .dneg(dneg_rc));

  // Scan window: first nonzero digit among the next min(rem, KMAX+1) digits.
  always_comb begin
    logic found;
    logic [RW-1:0] lim;
    found  = 1'b0;
    pair   = '0;
    lim    = (rem_q > RW'(KMAX + 1)) ? RW'(KMAX + 1) : rem_q;
    shamt  = SW'(lim);
    pair.k = (lim == '0) ? '0 : KW'(lim) - KW'(1);
    pair.z = SD_ZERO;
    for (int unsigned j = 0; j <= KMAX; j++) begin
      if (!found && RW'(j) < lim && (dpos_q[j] || dneg_q[j])) begin
        found  = 1'b1;
        pair.k = KW'(j);
        pair.z = dneg_q[j] ? SD_NEG : SD_POS;
        shamt  = SW'(j + 1);
      end
    end
    pair.last = (rem_q == RW'(shamt));
  end

  assign valid = (rem_q != '0);

  lim_barrel_shifter #(.W(L), .MAXSH(KMAX + 1), .LEFT(1'b0), .ARITH(1'b0)) u_shp (
    .din(dpos_q), .sh(shamt), .dout(dpos_sh));
  lim_barrel_shifter #(.W(L), .MAXSH(KMAX + 1), .LEFT(1'b0), .ARITH(1'b0)) u_shn (
    .din(dneg_q), .sh(shamt), .dout(dneg_sh));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dpos_q <= '0;
      dneg_q <= '0;
      rem_q  <= '0;
    end else if (load) begin
      dpos_q <= dpos_rc;
      dneg_q <= dneg_rc;
      rem_q  <= RW'(L);
    end else if (adv && valid) begin
      dpos_q <= dpos_sh;
      dneg_q <= dneg_sh;
      rem_q  <= rem_q - RW'(shamt);
    end
  end

  // A canonical digit string never holds +1 and -1 at one position.
  a_canonical: assert property (@(posedge clk) disable iff (!rst_n)
    (dpos_q & dneg_q) == '0)
    else $error("mcr_encoder: digit both positive and negative");

endmodule
