// tb_cmm_msd_modexp_full: the exponentiation engine at its default size
// (1024-bit modulus, 1024-bit exponent, zero runs limited to 6), two complete
// operations: one random exponent and one whose three thirds are equal.
// See modexp_harness for what is checked.
module tb_cmm_msd_modexp_full;
  modexp_harness #(.NOPS(2), .FULL(1'b1), .MECH(1'b0)) h ();
endmodule
