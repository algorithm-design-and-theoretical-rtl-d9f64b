// mont_const: Montgomery constants for modulus M (odd, M > 1), with the
// multiplier's factor R = 2^-L, L = NB+1:
//   r1     = 2^L  mod M   (the Montgomery form of 1; initial C/D value)
//   r2     = 2^2L mod M   (multiplying A by it with M4 gives A*2^L mod M)
//   mprime = -M^-1 mod 2^(KMAX+1)   (quotient digit factor of each M4 step)
//
// r1 and r2 come from one doubling chain: t = 1, then t = 2t mod M
// (a shift and at most one subtraction) once per clock, 2L clocks in all;
// t is captured as r1 after L doublings. mprime is the low bits of a
// Hensel-lifted inverse. The doubling hardware is this design's choice: the
// algorithm only states that A*R mod N and R mod N are formed first.
//
// Interface: pulse `start` with `modulus`; `busy` is high for 2L cycles and
// `done` pulses once when all three outputs are valid; they hold until the
// next start.
module mont_const
  import cmm_pkg::*;
#(
  parameter int unsigned NB   = NB_DEFAULT,
  parameter int unsigned KMAX = KMAX_DEFAULT,
  localparam int unsigned L   = NB + 1,
  localparam int unsigned CW  = $clog2(2 * L + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NB-1:0] modulus,
  output logic          busy,
  output logic          done,
  output logic [NB-1:0] r1,
  output logic [NB-1:0] r2,
  output logic [KMAX:0] mprime
);

  logic [NB-1:0] m_q, t_q, t_next;
  logic [NB:0]   t2;
  logic [CW-1:0] cnt_q;
  logic [15:0]   ninv;

  assign t2     = {t_q, 1'b0};
  assign t_next = (t2 >= {1'b0, m_q}) ? NB'(t2 - {1'b0, m_q}) : t2[NB-1:0];
  assign ninv   = neg_inv16(16'(modulus));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_q    <= '0;
      t_q    <= '0;
      cnt_q  <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      r1     <= '0;
      r2     <= '0;
      mprime <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        m_q    <= modulus;
        t_q    <= NB'(1);
        cnt_q  <= '0;
        busy   <= 1'b1;
        mprime <= ninv[KMAX:0];
      end else if (busy) begin
        t_q   <= t_next;
        cnt_q <= cnt_q + CW'(1);
        if (cnt_q == CW'(L - 1)) r1 <= t_next;
        if (cnt_q == CW'(2 * L - 1)) begin
          r2   <= t_next;
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  a_odd: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> modulus[0] && modulus > NB'(1))
    else $error("mont_const: modulus must be odd and above 1");

endmodule
