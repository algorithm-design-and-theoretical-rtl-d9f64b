// tb_cmm_msd_modexp: end-to-end test of the exponentiation engine at reduced
// size (64-bit modulus, 48-bit exponent), six operations, every mechanism
// required to occur. See modexp_harness for what is checked.
module tb_cmm_msd_modexp;
  modexp_harness #(.NB(64), .EB(48), .KMAX(6), .NOPS(6), .FULL(1'b0), .MECH(1'b1)) h ();
endmodule
