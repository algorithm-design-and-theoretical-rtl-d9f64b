// cmm_msd_modexp: CMM-MSD modular exponentiation engine built on the M4
// (MCR-scanned Montgomery) multiplier.
//
// The exponent E is recoded into minimal signed digits and cut into three
// parts E1, E2, E3 (E = E1*2^(2MP) + E2*2^MP + E3). One loop over the MP digit
// positions computes, in Montgomery form (factor 2^(NB+1) mod N):
//   C1 / D1 = A^(positive / negative digits of E_common)
//   C2..C4 / D2..D4 = A^(positive / negative digits of E1,c .. E3,c)
// where digit i contributes the power S_i = A^(2^i). In every iteration the
// current S is MCR-encoded once and that pair stream is the common
// multiplier of up to nine multiplications running in lock step: S = S*S and,
// for each accumulator selected by the exponent digits, C/D = S*C/D. Only S,
// C1..C4 and D1..D4 are stored; the encoder and the nine datapaths share one
// pair per clock.
//
// Sequence after `start` (all from this one module's state machine):
//   PRE   mont_const forms 2^L mod N, 2^2L mod N and -N^-1 (2L cycles);
//         the exponent unit recodes E.
//   CONV  S = M4(A, 2^2L mod N) = A*2^L mod N; C/D registers = 2^L mod N.
//   LOOP  MP iterations of 1 + (pairs of MCR(S)) cycles each.
// `done` pulses when the loop ends; c_out/d_out then hold the eight results
// until the next start. Combining them into A^E (inverting the D products and
// the post computation over the three parts) is left to the caller.
//
// Follows the algorithm: the shared MCR multiplier, the nine parallel
// multiplications per iteration, the C/D register roles, the zero-run limit
// of KMAX = 6. This design's choices: the fixed multiplication length L=NB+1,
// the constant generation, the FSM and handshake. A must be below 2^NB, N
// odd and above 1; A need not be reduced.
module cmm_msd_modexp
  import cmm_pkg::*;
#(
  parameter int unsigned NB   = NB_DEFAULT,
  parameter int unsigned EB   = EB_DEFAULT,
  parameter int unsigned KMAX = KMAX_DEFAULT,
  localparam int unsigned MP  = (EB + 3) / 3,   // ceil((EB+1)/3)
  localparam int unsigned IW  = $clog2(MP + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NB-1:0] a,
  input  logic [EB-1:0] e,
  input  logic [NB-1:0] modulus,
  output logic          busy,
  output logic          done,
  output logic [NB-1:0] c_out [4],
  output logic [NB-1:0] d_out [4]
);

  typedef enum logic [1:0] {ST_IDLE, ST_PRE, ST_CONV, ST_LOOP} state_t;

  state_t        state_q;
  logic [NB-1:0] a_q, m_q;
  logic [IW-1:0] it_q;
  logic [3:0]    sel_c_q, sel_d_q;

  // constants
  logic          mc_done;
  logic          mc_busy;
  logic [NB-1:0] r1, r2;
  logic [KMAX:0] mprime;

  // shared multiplier (S path)
  logic          mm_start, mm_busy, mm_done;
  logic [NB-1:0] mm_x, mm_y, s_val;
  logic          pair_valid;
  mcr_pair_t     pair;

  // exponent digits
  logic [3:0]    mul_c, mul_d;
  logic          ex_adv;

  logic          iter_start;  // first cycle of a loop iteration
  logic          cd_load;

  mont_const #(.NB(NB), .KMAX(KMAX)) u_const (
    .clk, .rst_n,
    .start  (start && state_q == ST_IDLE),
    .modulus(modulus),
    .busy   (mc_busy),
    .done   (mc_done),
    .r1, .r2, .mprime
  );

  exp_cmm_split #(.EB(EB)) u_exp (
    .clk, .rst_n,
    .load (start && state_q == ST_IDLE),
    .e    (e),
    .adv  (ex_adv),
    .mul_c(mul_c),
    .mul_d(mul_d)
  );

  m4_mult #(.NB(NB), .KMAX(KMAX)) u_s (
    .clk, .rst_n,
    .start     (mm_start),
    .x         (mm_x),
    .y         (mm_y),
    .modulus   (m_q),
    .mprime    (mprime),
    .busy      (mm_busy),
    .done      (mm_done),
    .result    (s_val),
    .pair_valid(pair_valid),
    .pair      (pair)
  );

  // C1..C4 (index 0..3) and D1..D4 datapaths, driven by the S pair stream.
  for (genvar j = 0; j < 4; j++) begin : g_acc
    m4_pe #(.NB(NB), .KMAX(KMAX)) u_c (
      .clk, .rst_n,
      .load   (cd_load),
      .y_in   (r1),
      .start  (iter_start && mul_c[j]),
      .step   (pair_valid && !iter_start && sel_c_q[j]),
      .pair   (pair),
      .modulus(m_q),
      .mprime (mprime),
      .y      (c_out[j])
    );
    m4_pe #(.NB(NB), .KMAX(KMAX)) u_d (
      .clk, .rst_n,
      .load   (cd_load),
      .y_in   (r1),
      .start  (iter_start && mul_d[j]),
      .step   (pair_valid && !iter_start && sel_d_q[j]),
      .pair   (pair),
      .modulus(m_q),
      .mprime (mprime),
      .y      (d_out[j])
    );
  end

  // Control
  always_comb begin
    cd_load    = (state_q == ST_PRE) && mc_done;
    iter_start = mm_done && (state_q == ST_CONV ||
                 (state_q == ST_LOOP && it_q != IW'(MP - 1)));
    mm_start   = cd_load || iter_start;
    mm_x       = cd_load ? a_q : s_val;
    mm_y       = cd_load ? r2  : s_val;
    ex_adv     = iter_start;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      a_q     <= '0;
      m_q     <= '0;
      it_q    <= '0;
      sel_c_q <= '0;
      sel_d_q <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (iter_start) begin
        sel_c_q <= mul_c;
        sel_d_q <= mul_d;
      end
      unique case (state_q)
        ST_IDLE: if (start) begin
          a_q     <= a;
          m_q     <= modulus;
          state_q <= ST_PRE;
        end
        ST_PRE:  if (mc_done) state_q <= ST_CONV;
        ST_CONV: if (mm_done) begin
          it_q    <= '0;
          state_q <= ST_LOOP;
        end
        ST_LOOP: if (mm_done) begin
          if (it_q == IW'(MP - 1)) begin
            sel_c_q <= '0;
            sel_d_q <= '0;
            done    <= 1'b1;
            state_q <= ST_IDLE;
          end else begin
            it_q <= it_q + IW'(1);
          end
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  assign busy = (state_q != ST_IDLE);

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> state_q == ST_IDLE)
    else $error("cmm_msd_modexp: start while busy");

  // a new multiplication starts only once the previous one (or the constant
  // generation) has finished
  a_seq: assert property (@(posedge clk) disable iff (!rst_n)
    mm_start |-> !mm_busy && !mc_busy)
    else $error("cmm_msd_modexp: multiplication started while a unit is busy");

  // exactly one of +1/-1 per accumulator pair
  a_sel: assert property (@(posedge clk) disable iff (!rst_n)
    iter_start |-> (mul_c & mul_d) == '0)
    else $error("cmm_msd_modexp: digit both positive and negative");

endmodule
