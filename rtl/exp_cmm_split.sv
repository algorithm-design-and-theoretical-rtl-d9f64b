// exp_cmm_split: exponent digit unit of the CMM-MSD exponentiation.
//
// On `load` the EB-bit exponent E is recoded into minimal signed digits
// (cr_recoder, EB+1 digits), padded with zeros to 3*MP digits and cut into
// three equal parts: E1 (top), E2 (middle) and E3 (bottom), so that
//   E = E1 * 2^(2*MP) + E2 * 2^MP + E3.
// Each iteration looks at digit i of all three parts at once. Where the three
// digits are equal and nonzero the digit is common (E_common = E1 AND E2 AND
// E3); the remaining digits form E_j,c = E_j XOR E_common. The outputs say
// which accumulator the current power of A goes into:
//   mul_c[0] / mul_d[0]: common digit +1 / -1 (C1 / D1)
//   mul_c[j] / mul_d[j]: E_j,c digit +1 / -1 (C(j+1) / D(j+1)), j = 1..3
// At most one of mul_c[j], mul_d[j] is set for each j, and when the common
// digit is set mul_c/d[1..3] are all clear.
//
// The digit-wise AND/XOR rule (equal nonzero digits are common) is this
// design's reading of the operators; the split into three parts follows the
// algorithm.
//
// Interface: `load` (one cycle) captures e; the outputs then show digit 0;
// `adv` moves to the next digit. MP = ceil((EB+1)/3) iterations cover E.
module exp_cmm_split
  import cmm_pkg::*;
#(
  parameter int unsigned EB = EB_DEFAULT,
  localparam int unsigned ND = EB + 1,
  localparam int unsigned MP = (ND + 2) / 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [EB-1:0] e,
  input  logic          adv,
  output logic [3:0]    mul_c,
  output logic [3:0]    mul_d
);

  logic [ND-1:0]   npos, nneg;
  logic [3*MP-1:0] ppos, pneg;
  // part registers, index 1 = E1 (top) .. 3 = E3 (bottom)
  logic [MP-1:0]   pp_q [1:3];
  logic [MP-1:0]   pn_q [1:3];

  cr_recoder #(.W(EB)) u_cr (.x(e), .dpos(npos), .dneg(nneg));

  assign ppos = (3*MP)'(npos);
  assign pneg = (3*MP)'(nneg);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 1; j <= 3; j++) begin
        pp_q[j] <= '0;
        pn_q[j] <= '0;
      end
    end else if (load) begin
      pp_q[1] <= ppos[2*MP +: MP];
      pn_q[1] <= pneg[2*MP +: MP];
      pp_q[2] <= ppos[MP +: MP];
      pn_q[2] <= pneg[MP +: MP];
      pp_q[3] <= ppos[0 +: MP];
      pn_q[3] <= pneg[0 +: MP];
    end else if (adv) begin
      for (int j = 1; j <= 3; j++) begin
        pp_q[j] <= pp_q[j] >> 1;
        pn_q[j] <= pn_q[j] >> 1;
      end
    end
  end

  always_comb begin
    logic com_p, com_n;
    com_p = pp_q[1][0] & pp_q[2][0] & pp_q[3][0];
    com_n = pn_q[1][0] & pn_q[2][0] & pn_q[3][0];
    mul_c[0] = com_p;
    mul_d[0] = com_n;
    for (int j = 1; j <= 3; j++) begin
      mul_c[j] = pp_q[j][0] & ~com_p;
      mul_d[j] = pn_q[j][0] & ~com_n;
    end
  end

endmodule
