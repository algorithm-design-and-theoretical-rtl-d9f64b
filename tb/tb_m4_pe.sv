// tb_m4_pe: checks one M4 datapath fed with MCR pairs made by the testbench.
// The pairs of X come from an independent model (non-adjacent form as
// (3x - x)/2, zero runs cut at KMAX, padded to NB+1 positions). The result R
// must satisfy R < M and R * 2^(NB+1) = X * Y (mod M), computed with wide
// multiplication and remainder. The operand register must hold Y until the
// last step, and the final subtraction of M must occur. How often the
// (rare) negative result needed M added back is reported.
module tb_m4_pe;
  import cmm_pkg::*;
  localparam int unsigned NB = 64;
  localparam int unsigned KMAX = 6;
  localparam int unsigned L = NB + 1;

  logic clk = 0, rst_n = 0, load = 0, start = 0, step = 0;
  logic [NB-1:0] y_in, modulus, y;
  logic [KMAX:0] mprime;
  mcr_pair_t pair;
  int checks = 0, failures = 0;
  int n_fix_neg = 0, n_fix_big = 0;

  m4_pe #(.NB(NB), .KMAX(KMAX)) dut (.clk, .rst_n, .load, .y_in, .start, .step,
    .pair, .modulus, .mprime, .y);

  always #5 clk = ~clk;

  function automatic logic [KMAX:0] ninv(input logic [NB-1:0] m);
    logic [KMAX:0] v;
    for (int c = 0; c < (1 << (KMAX + 1)); c++)
      if ((((KMAX+1)'(c) * m[KMAX:0]) + (KMAX+1)'(1)) == '0) v = (KMAX+1)'(c);
    return v;
  endfunction

  task automatic mult(input logic [NB-1:0] xv, input logic [NB-1:0] yv, input logic [NB-1:0] mv);
    logic [NB+1:0] xx, x3;
    logic [L-1:0] np, nn;
    logic [3*NB+2:0] lhs, rhs;
    int pos, r, j;
    bit held;
    // reference partial result: smallest q making p + qM divisible by 2^(k+1)
    logic signed [NB+15:0] sref, pref;
    sref = '0;
    xx = (NB+2)'(xv);
    x3 = xx + (xx << 1);
    np = L'((x3 & ~xx) >> 1);
    nn = L'((~x3 & xx) >> 1);
    @(negedge clk);
    modulus = mv; mprime = ninv(mv);
    y_in = yv; load = 1; start = 1;
    @(negedge clk);
    load = 0; start = 0;
    pos = 0; held = 1;
    while (pos < L) begin
      r = (L - pos < KMAX + 1) ? L - pos : KMAX + 1;
      j = 0;
      while (j < r && !(np[pos + j] || nn[pos + j])) j++;
      if (j < r) begin
        pair.k = KW'(j);
        pair.z = np[pos + j] ? SD_POS : SD_NEG;
        pos += j + 1;
      end else begin
        pair.k = KW'(r - 1);
        pair.z = SD_ZERO;
        pos += r;
      end
      pair.last = (pos == L);
      pref = sref;
      if (pair.z == SD_POS) pref += (NB+16)'(yv) << pair.k;
      if (pair.z == SD_NEG) pref -= (NB+16)'(yv) << pair.k;
      for (int qq = 0; qq < (1 << (pair.k + 1)); qq++) begin
        if ((((pref + (NB+16)'(qq) * (NB+16)'(mv)) & (NB+16)'((1 << (pair.k + 1)) - 1))) == 0) begin
          sref = (pref + (NB+16)'(qq) * (NB+16)'(mv)) >>> (pair.k + 1);
          break;
        end
      end
      step = 1;
      if (y != yv) held = 0;
      @(negedge clk);
    end
    step = 0;
    if (sref < 0) n_fix_neg++;
    else if (sref >= $signed((NB+16)'(mv))) n_fix_big++;
    lhs = ((3*NB+3)'(y) << L) % (3*NB+3)'(mv);
    rhs = ((3*NB+3)'(xv) * (3*NB+3)'(yv)) % (3*NB+3)'(mv);
    checks++;
    if (y >= mv || lhs != rhs) begin
      failures++; $display("FAIL x=%h y=%h m=%h got %h", xv, yv, mv, y);
    end
    checks++;
    if (!held) begin
      failures++; $display("FAIL operand changed during multiplication");
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NB-1:0] m, xv, yv;
    pair = '0; y_in = '0; modulus = '1; mprime = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      m = {$urandom, $urandom} | NB'(1);
      if (t % 3 == 0) m[NB-1] = 1'b1;
      if (t % 7 == 1) m = NB'({$urandom} | 1);   // small modulus, X >> M
      xv = {$urandom, $urandom};
      if (t % 5 == 0) xv = xv & {$urandom, $urandom} & {$urandom, $urandom}; // long zero runs
      if (t % 3 == 0) xv = xv % m;
      yv = {$urandom, $urandom} % m;
      if (t == 1) yv = m - 1;
      mult(xv, yv, m);
    end
    checks++;
    if (n_fix_big == 0) begin
      failures++; $display("FAIL final subtraction of M never seen");
    end
    $display("corrections: add M %0d, subtract M %0d", n_fix_neg, n_fix_big);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
