// m4_pe: one datapath of the modified Montgomery multiplier (M4).
//
// It holds an operand/result register Y and a partial result S. For every
// MCR pair (k, z) of the shared multiplier it performs one step:
//   p  = S + z * 2^k * Y                 (z in {-1, 0, +1}: add, subtract, skip)
//   q  = (-M^-1 * p) mod 2^(k+1)         (low k+1 bits, from mprime)
//   S' = (p + q*M) / 2^(k+1)             (exact; arithmetic right shift by k+1)
// so a run of k zero digits and the digit after it cost one clock instead of
// k+1. Both variable shifts go through limited barrel shifters (left by at
// most KMAX, right by at most KMAX+1). S is signed because z may be -1; with
// Y < M it stays inside (-M, 2M), so NB+2 bits hold it. On the final pair the
// result is brought into [0, M) by adding or subtracting M once and written
// back into Y, which is where the next multiplication reads it.
//
// Interface: `load` writes y_in into Y; `start` clears S (both may be given
// together); `step` applies `pair` (valid the same cycle). `mprime` is
// -M^-1 mod 2^(KMAX+1). Y is stable until the step that carries pair.last.
// The published algorithm corrects only S >= M; the extra add for a negative S follows
// from allowing -1 digits and is this design's.
module m4_pe
  import cmm_pkg::*;
#(
  parameter int unsigned NB   = NB_DEFAULT,
  parameter int unsigned KMAX = KMAX_DEFAULT,
  localparam int unsigned AW  = NB + KMAX + 4,   // step arithmetic width
  localparam int unsigned SBW = NB + 2,          // stored partial result
  localparam int unsigned SW  = $clog2(KMAX + 2)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [NB-1:0]   y_in,
  input  logic            start,
  input  logic            step,
  input  mcr_pair_t       pair,
  input  logic [NB-1:0]   modulus,
  input  logic [KMAX:0]   mprime,
  output logic [NB-1:0]   y
);

  logic signed [SBW-1:0] s_q;
  logic [AW-1:0]         y_ext, y_shl;
  logic signed [AW-1:0]  p, sum, s_next, s_fix;
  logic [KMAX:0]         q, qmask;
  logic [2*KMAX+1:0]     qfull;
  logic [SW-1:0]         rsh;

  assign y_ext = AW'(y);

  // 2^k * Y
  lim_barrel_shifter #(.W(AW), .MAXSH(KMAX), .LEFT(1'b1), .ARITH(1'b0)) u_shl (
    .din(y_ext), .sh($clog2(KMAX + 1)'(pair.k)), .dout(y_shl));

  always_comb begin
    unique case (pair.z)
      SD_POS:  p = AW'(s_q) + $signed(y_shl);
      SD_NEG:  p = AW'(s_q) - $signed(y_shl);
      default: p = AW'(s_q);
    endcase
    qmask = (KMAX + 1)'((32'd1 << (32'(pair.k) + 32'd1)) - 32'd1);
    qfull = p[KMAX:0] * mprime;
    q     = qfull[KMAX:0] & qmask;
    sum   = p + $signed(AW'(q) * AW'(modulus));
    rsh   = SW'(pair.k) + SW'(1);
  end

  // (p + qM) / 2^(k+1)
  lim_barrel_shifter #(.W(AW), .MAXSH(KMAX + 1), .LEFT(1'b0), .ARITH(1'b1)) u_shr (
    .din(sum), .sh(rsh), .dout(s_next));

  always_comb begin
    if (s_next < 0)
      s_fix = s_next + $signed(AW'(modulus));
    else if (s_next >= $signed(AW'(modulus)))
      s_fix = s_next - $signed(AW'(modulus));
    else
      s_fix = s_next;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_q <= '0;
      y   <= '0;
    end else begin
      if (step) begin
        if (pair.last) begin
          y   <= s_fix[NB-1:0];
          s_q <= '0;
        end else begin
          s_q <= s_next[SBW-1:0];
        end
      end
      if (start) s_q <= '0;
      if (load)  y   <= y_in;
    end
  end

  // The low k+1 bits cancel exactly, and S stays within its NB+2 bits.
  a_exact: assert property (@(posedge clk) disable iff (!rst_n)
    step |-> (sum & AW'(qmask)) == '0)
    else $error("m4_pe: p + qM not divisible by 2^(k+1)");
  a_range: assert property (@(posedge clk) disable iff (!rst_n)
    step |-> s_next == AW'($signed(s_next[SBW-1:0])))
    else $error("m4_pe: partial result overflow");

endmodule
