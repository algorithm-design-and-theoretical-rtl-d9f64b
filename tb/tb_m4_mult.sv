// tb_m4_mult: checks the M4 multiplier as a unit.
// Random odd moduli (full width and short), operands X < 2^NB and Y < M.
// Checks per multiplication: result < M and result * 2^(NB+1) = X*Y (mod M);
// cycles from start to done equal 1 + the pair count of an independent
// non-adjacent-form model of X; the exported pair stream ends with `last`.
// Over all runs the mean number of multiplication steps must be close to a
// third of the operand length (the point of the multi-bit scan).
module tb_m4_mult;
  import cmm_pkg::*;
  localparam int unsigned NB = 128;
  localparam int unsigned KMAX = 6;
  localparam int unsigned L = NB + 1;

  logic clk = 0, rst_n = 0, start = 0;
  logic [NB-1:0] x, y, modulus, result;
  logic [KMAX:0] mprime;
  logic busy, done, pair_valid;
  mcr_pair_t pair;
  int checks = 0, failures = 0;
  longint total_pairs = 0, n_mult = 0;

  m4_mult #(.NB(NB), .KMAX(KMAX)) dut (.clk, .rst_n, .start, .x, .y, .modulus, .mprime,
    .busy, .done, .result, .pair_valid, .pair);

  always #5 clk = ~clk;

  function automatic int model_pairs(input logic [NB-1:0] v);
    logic [NB+1:0] xx, x3;
    logic [L-1:0] nz;
    int pos, cnt, r, j;
    xx = (NB+2)'(v);
    x3 = xx + (xx << 1);
    nz = L'(((x3 & ~xx) | (~x3 & xx)) >> 1);
    pos = 0; cnt = 0;
    while (pos < L) begin
      r = (L - pos < KMAX + 1) ? L - pos : KMAX + 1;
      j = 0;
      while (j < r && !nz[pos + j]) j++;
      pos += (j < r) ? j + 1 : r;
      cnt++;
    end
    return cnt;
  endfunction

  function automatic logic [KMAX:0] ninv(input logic [NB-1:0] m);
    logic [KMAX:0] v;
    for (int c = 0; c < (1 << (KMAX + 1)); c++)
      if ((((KMAX+1)'(c) * m[KMAX:0]) + (KMAX+1)'(1)) == '0) v = (KMAX+1)'(c);
    return v;
  endfunction

  task automatic mult(input logic [NB-1:0] xv, input logic [NB-1:0] yv, input logic [NB-1:0] mv);
    logic [3*NB+2:0] lhs, rhs;
    int cyc, lastseen;
    @(negedge clk);
    x = xv; y = yv; modulus = mv; mprime = ninv(mv);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1; lastseen = 0;
    while (!done && cyc < 4 * L) begin
      if (pair_valid && pair.last) lastseen++;
      @(negedge clk);
      cyc++;
    end
    lhs = ((3*NB+3)'(result) << L) % (3*NB+3)'(mv);
    rhs = ((3*NB+3)'(xv) * (3*NB+3)'(yv)) % (3*NB+3)'(mv);
    checks++;
    if (result >= mv || lhs != rhs) begin
      failures++; $display("FAIL x=%h y=%h m=%h got %h", xv, yv, mv, result);
    end
    checks++;
    if (cyc != 1 + model_pairs(xv) || lastseen != 1) begin
      failures++; $display("FAIL latency %0d expected %0d (last %0d)", cyc, 1 + model_pairs(xv), lastseen);
    end
    total_pairs += longint'(model_pairs(xv));
    n_mult++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NB-1:0] m, xv, yv;
    real avg;
    x = '0; y = '0; modulus = '1; mprime = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      m = {$urandom, $urandom, $urandom, $urandom} | NB'(1);
      m[NB-1] = (t % 4 != 3);
      if (t % 9 == 4) m = NB'({$urandom} | 1);
      xv = {$urandom, $urandom, $urandom, $urandom};
      if (t % 2 == 0) xv = xv % m;
      yv = {$urandom, $urandom, $urandom, $urandom} % m;
      mult(xv, yv, m);
    end
    avg = real'(total_pairs) / real'(n_mult);
    $display("mean steps per multiplication %0.2f for %0d digit positions", avg, L);
    checks++;
    if (avg < 0.30 * L || avg > 0.40 * L) begin
      failures++; $display("FAIL mean step count %0.2f not near L/3", avg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
