// cr_recoder: canonical (non-adjacent form) recoding of a W-bit unsigned
// integer into W+1 signed digits in {-1, 0, +1}.
//
// It evaluates the carry recurrence of the canonical recoding directly:
//   c(0) = 0,  c(i+1) = floor((x(i) + x(i+1) + c(i)) / 2),
//   d(i) = x(i) + c(i) - 2*c(i+1),   for i = 0 .. W  (x(W) = x(W+1) = 0).
// The result has no two adjacent nonzero digits and minimal Hamming weight
// (about W/3 nonzero digits on average).
//
// Interface: purely combinational. Digit i is +1 when dpos[i] is set, -1 when
// dneg[i] is set, 0 when neither is; both are never set together. The carry
// chain is a ripple of W stages, which follows the recurrence as written;
// a faster adder-based form (3x - x) would be an implementation choice.
module cr_recoder #(
  parameter int unsigned W = cmm_pkg::NB_DEFAULT
) (
  input  logic [W-1:0] x,
  output logic [W:0]   dpos,
  output logic [W:0]   dneg
);

  logic [W+1:0] xe;
  logic [W+1:0] c;

  always_comb begin
    xe = {2'b00, x};
    c  = '0;
    dpos = '0;
    dneg = '0;
    for (int unsigned i = 0; i <= W; i++) begin
      // carry out: at least two of x(i), x(i+1), c(i) set
      c[i+1] = (xe[i] & xe[i+1]) | (xe[i] & c[i]) | (xe[i+1] & c[i]);
      // d = x + c - 2c': +1 when x+c = 1 and no carry, -1 when x+c = 1 with carry
      dpos[i] = (xe[i] ^ c[i]) & ~c[i+1];
      dneg[i] = (xe[i] ^ c[i]) &  c[i+1];
    end
  end

endmodule
