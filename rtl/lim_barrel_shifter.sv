// lim_barrel_shifter: barrel shifter whose shift amount is limited to MAXSH.
//
// The multi-bit scan / multi-bit shift multiplier shifts by a variable amount
// each step, but zero runs are capped, so only a few shift distances are ever
// needed. The shifter is built as log2(MAXSH+1) stages; stage s moves the word
// by 2^s when bit s of the amount is set. LEFT selects the direction; a right
// shift fills with the sign bit when ARITH is set, otherwise with zeros.
//
// Interface: combinational. `sh` must not exceed MAXSH (asserted).
module lim_barrel_shifter #(
  parameter int unsigned W     = 64,
  parameter int unsigned MAXSH = cmm_pkg::KMAX_DEFAULT + 1,
  parameter bit          LEFT  = 1'b0,
  parameter bit          ARITH = 1'b0,
  localparam int unsigned SW   = (MAXSH < 2) ? 1 : $clog2(MAXSH + 1)
) (
  input  logic [W-1:0]  din,
  input  logic [SW-1:0] sh,
  output logic [W-1:0]  dout
);

  logic [W-1:0] stage [SW+1];

  assign stage[0] = din;

  for (genvar s = 0; s < SW; s++) begin : g_stage
    localparam int unsigned D = 1 << s;
    logic [W-1:0] moved;
    if (LEFT) begin : g_l
      assign moved = stage[s] << D;
    end else if (ARITH) begin : g_ra
      assign moved = W'($signed(stage[s]) >>> D);
    end else begin : g_rl
      assign moved = stage[s] >> D;
    end
    assign stage[s+1] = sh[s] ? moved : stage[s];
  end

  assign dout = stage[SW];

  always_comb begin
    assert (32'(sh) <= MAXSH)
      else $error("lim_barrel_shifter: shift %0d above limit %0d", sh, MAXSH);
  end

endmodule
