// m4_mult: modified Montgomery modular multiplier (M4),
//   result = X * Y * 2^-(NB+1) mod M.
//
// The multiplier X is MCR-encoded by mcr_encoder and consumed one pair per
// clock by an m4_pe datapath holding Y. Each clock retires one zero run plus
// the nonzero digit after it, so a multiplication takes about NB/3 steps
// instead of the NB steps of bit-serial Montgomery multiplication. The pair
// stream is also brought out, so further m4_pe datapaths can multiply their
// own operands by the same X in lock step (the common multiplier of the CMM
// exponentiation).
//
// The Montgomery factor is 2^-(NB+1) rather than 2^-NB because the canonical
// recoding of an NB-bit operand has NB+1 digits; this is this design's choice.
//
// Interface and timing: pulse `start` with x, y (y < M), modulus (odd) and
// mprime = -M^-1 mod 2^(KMAX+1). The encoder loads in that cycle, then one
// pair is processed per cycle while `busy`. `done` pulses for one cycle
// after the last pair, with `result` valid from then until the next start.
// A multiplication therefore takes 1 + (number of pairs) cycles from start to
// the cycle in which the next start may be given.
module m4_mult
  import cmm_pkg::*;
#(
  parameter int unsigned NB   = NB_DEFAULT,
  parameter int unsigned KMAX = KMAX_DEFAULT
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NB-1:0] x,
  input  logic [NB-1:0] y,
  input  logic [NB-1:0] modulus,
  input  logic [KMAX:0] mprime,
  output logic          busy,
  output logic          done,
  output logic [NB-1:0] result,
  output logic          pair_valid,
  output mcr_pair_t     pair
);

  mcr_encoder #(.NB(NB), .KMAX(KMAX)) u_enc (
    .clk, .rst_n,
    .load (start),
    .x    (x),
    .adv  (1'b1),
    .valid(pair_valid),
    .pair (pair)
  );

  m4_pe #(.NB(NB), .KMAX(KMAX)) u_pe (
    .clk, .rst_n,
    .load   (start),
    .y_in   (y),
    .start  (start),
    .step   (pair_valid && !start),
    .pair   (pair),
    .modulus(modulus),
    .mprime (mprime),
    .y      (result)
  );

  assign busy = pair_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) done <= 1'b0;
    else        done <= pair_valid && pair.last && !start;
  end

  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !pair_valid)
    else $error("m4_mult: start while a multiplication is running");

endmodule
