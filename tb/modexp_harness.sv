// modexp_harness: end-to-end checker for cmm_msd_modexp, shared by the
// reduced-size and the full-size testbench.
//
// For each operation (random odd modulus N with its top bit set, A < 2^NB,
// exponent E) it checks, against wide-integer arithmetic done here:
//  * each of the eight outputs equals A^e * 2^(NB+1) mod N, where e is the
//    part of E that output collects (digits from this checker's own
//    non-adjacent form, (3E - E)/2, split into thirds and classified);
//  * end to end, without any inverse: with P = prod of C's and Q = prod of D's
//    taken as (X1)^(2^2MP) * (X2)^(2^MP) * X3, P = A^E * Q (mod N);
//  * the cycle count from start to done: 2L + 3 + pairs(A) +
//    sum over the MP iterations of (1 + pairs(S_i)), S_i = A^(2^i)*2^L mod N,
//    pairs() from this checker's own MCR model;
//  * the mean steps per multiplication lies between 0.30 and 0.40 of L.
// It also counts how often each mechanism occurred: +1 and -1 digits, a zero
// run cut at the shifter limit, a full KMAX shift before a digit, common
// digits of both signs, and each of the eight accumulators being selected.
// With MECH set, one that never occurred counts as a failure.
// FULL instantiates the design with its default parameters.
module modexp_harness
  import cmm_pkg::*;
#(
  parameter int unsigned NB   = NB_DEFAULT,
  parameter int unsigned EB   = EB_DEFAULT,
  parameter int unsigned KMAX = KMAX_DEFAULT,
  parameter int unsigned NOPS = 4,
  parameter bit          FULL = 1'b0,
  parameter bit          MECH = 1'b1
) ();
  localparam int unsigned L  = NB + 1;
  localparam int unsigned MP = (EB + 3) / 3;
  localparam int unsigned WW = 2 * NB + 4;      // product width
  typedef logic [WW-1:0] wide_t;
  typedef logic [3*MP+1:0] ex_t;                // exponent pieces

  logic clk = 0, rst_n = 0, start = 0;
  logic [NB-1:0] a, modulus;
  logic [EB-1:0] e;
  logic busy, done;
  logic [NB-1:0] c_out [4];
  logic [NB-1:0] d_out [4];
  int checks = 0, failures = 0;

  // mechanism counters
  int m_pos = 0, m_neg = 0, m_zero_pair = 0, m_kmax = 0, m_com_p = 0, m_com_n = 0;
  int m_sel [8];
  longint tot_pairs = 0, n_mults = 0;

  if (FULL) begin : g_full
    cmm_msd_modexp dut (.clk, .rst_n, .start, .a, .e, .modulus, .busy, .done, .c_out, .d_out);
  end else begin : g_small
    cmm_msd_modexp #(.NB(NB), .EB(EB), .KMAX(KMAX)) dut (
      .clk, .rst_n, .start, .a, .e, .modulus, .busy, .done, .c_out, .d_out);
  end

  always #5 clk = ~clk;

  // x * y mod n for x, y < n, by interleaved doubling and adding
  function automatic wide_t mulmod(input wide_t x, input wide_t y, input wide_t n);
    wide_t r;
    r = '0;
    for (int i = NB + 1; i >= 0; i--) begin
      r = r << 1;
      if (r >= n) r = r - n;
      if (y[i]) begin
        r = r + x;
        if (r >= n) r = r - n;
      end
    end
    return r;
  endfunction

  function automatic wide_t reduce(input wide_t x, input wide_t n);
    wide_t r;
    r = '0;
    for (int i = WW - 1; i >= 0; i--) begin
      r = (r << 1) | wide_t'(x[i]);
      if (r >= n) r = r - n;
    end
    return r;
  endfunction

  function automatic wide_t powmod(input wide_t b, input ex_t ex, input wide_t n);
    wide_t r, t;
    ex_t   rest;
    r = reduce(wide_t'(1), n);
    t = reduce(b, n);
    rest = ex;
    while (rest != '0) begin
      if (rest[0]) r = mulmod(r, t, n);
      t = mulmod(t, t, n);
      rest = rest >> 1;
    end
    return r;
  endfunction

  function automatic wide_t sqr_times(input wide_t b, input int times, input wide_t n);
    wide_t r;
    r = b;
    for (int i = 0; i < times; i++) r = mulmod(r, r, n);
    return r;
  endfunction

  // MCR pair count of v, and mechanism counts of its pairs
  function automatic int pairs_of(input logic [NB-1:0] v, input bit count);
    logic [NB+1:0] xx, x3;
    logic [L-1:0] np, nn;
    int pos, cnt, r, j;
    xx = (NB+2)'(v);
    x3 = xx + (xx << 1);
    np = L'((x3 & ~xx) >> 1);
    nn = L'((~x3 & xx) >> 1);
    pos = 0; cnt = 0;
    while (pos < L) begin
      r = (L - pos < KMAX + 1) ? L - pos : KMAX + 1;
      j = 0;
      while (j < r && !(np[pos + j] || nn[pos + j])) j++;
      if (count) begin
        if (j >= r) m_zero_pair++;
        else begin
          if (np[pos + j]) m_pos++; else m_neg++;
          if (j == int'(KMAX)) m_kmax++;
        end
      end
      pos += (j < r) ? j + 1 : r;
      cnt++;
    end
    return cnt;
  endfunction

  // working variables of run_op (kept static: the task waits on the clock)
  logic [3*MP+1:0] xx, x3;
  logic [3*MP-1:0] dp, dn;
  ex_t pe [8];                 // C1..C4, D1..D4 exponents
  wide_t n, r, rinv, t, s_i, got, expv, xp, xq, lhs, rhs;
  wide_t cn [4], dnn [4];
  longint expcyc, cyc;
  int np_i;
  bit okv;
  wide_t aw;
  ex_t   ew;

  task static run_op(input logic [NB-1:0] av, input logic [EB-1:0] ev, input logic [NB-1:0] nv);
    aw = '0; aw[NB-1:0] = av;
    ew = '0; ew[EB-1:0] = ev;
    n = '0; n[NB-1:0] = nv;
    r = reduce(wide_t'(1) << L, n);
    rinv = powmod((n + 1) >> 1, ex_t'(L), n);
    // own recoding and split of E
    xx = (3*MP+2)'(ev);
    x3 = xx + (xx << 1);
    dp = (3*MP)'((x3 & ~xx) >> 1);
    dn = (3*MP)'((~x3 & xx) >> 1);
    for (int k = 0; k < 8; k++) pe[k] = '0;
    for (int i = 0; i < int'(MP); i++) begin
      int v [1:3];
      int com;
      for (int p = 1; p <= 3; p++) begin
        int idx;
        idx = (3 - p) * int'(MP) + i;
        v[p] = dp[idx] ? 1 : (dn[idx] ? -1 : 0);
      end
      com = (v[1] == v[2] && v[2] == v[3]) ? v[1] : 0;
      if (com == 1)  begin pe[0][i] = 1'b1; m_com_p++; m_sel[0]++; end
      if (com == -1) begin pe[4][i] = 1'b1; m_com_n++; m_sel[4]++; end
      if (com == 0) for (int p = 1; p <= 3; p++) begin
        if (v[p] == 1)  begin pe[p][i] = 1'b1;     m_sel[p]++;     end
        if (v[p] == -1) begin pe[4 + p][i] = 1'b1; m_sel[4 + p]++; end
      end
    end
    // expected cycle count
    expcyc = 2 * longint'(L) + 3 + longint'(pairs_of(av, 1'b0));
    t = reduce(aw, n);
    for (int i = 0; i < int'(MP); i++) begin
      s_i = mulmod(t, r, n);
      np_i = pairs_of(NB'(s_i), 1'b1);
      tot_pairs += longint'(np_i);
      n_mults++;
      expcyc += 1 + longint'(np_i);
      t = mulmod(t, t, n);
    end
    // run the design
    @(negedge clk);
    a = av; e = ev; modulus = nv; start = 1;
    @(negedge clk);
    start = 0; a = '0; e = '0; modulus = '0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != expcyc) begin
      failures++; $display("FAIL cycles %0d expected %0d", cyc, expcyc);
    end
    // each output
    for (int k = 0; k < 8; k++) begin
      got  = wide_t'(k < 4 ? c_out[k] : d_out[k - 4]);
      expv = mulmod(powmod(aw, pe[k], n), r, n);
      checks++;
      if (got != expv) begin
        failures++; $display("FAIL %s%0d got %h expected %h", k < 4 ? "C" : "D", (k % 4) + 1, got, expv);
      end
    end
    // end to end, inverse free
    for (int k = 0; k < 4; k++) begin
      cn[k]  = mulmod(wide_t'(c_out[k]), rinv, n);
      dnn[k] = mulmod(wide_t'(d_out[k]), rinv, n);
    end
    xp = mulmod(mulmod(sqr_times(mulmod(cn[0], cn[1], n), 2 * int'(MP), n),
                       sqr_times(mulmod(cn[0], cn[2], n), int'(MP), n), n),
                mulmod(cn[0], cn[3], n), n);
    xq = mulmod(mulmod(sqr_times(mulmod(dnn[0], dnn[1], n), 2 * int'(MP), n),
                       sqr_times(mulmod(dnn[0], dnn[2], n), int'(MP), n), n),
                mulmod(dnn[0], dnn[3], n), n);
    lhs = xp;
    rhs = mulmod(powmod(aw, ew, n), xq, n);
    okv = (lhs == rhs);
    checks++;
    if (!okv) begin
      failures++; $display("FAIL end to end: C side %h, A^E * D side %h", lhs, rhs);
    end
    $display("op done: %0d cycles, A^E mod N = %h", cyc, NB'(powmod(aw, ew, n)));
    if (!okv) $display("  A=%h E=%h N=%h C=%h %h %h %h D=%h %h %h %h", av, ev, nv, c_out[0], c_out[1], c_out[2], c_out[3], d_out[0], d_out[1], d_out[2], d_out[3]);
  endtask

  localparam int unsigned RW = 32 * ((NB > EB ? NB : EB) / 32 + 1);

  function automatic logic [RW-1:0] rand_w();
    logic [RW-1:0] v;
    for (int i = 0; i < int'(RW); i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [NB-1:0] rand_nb();
    return NB'(rand_w());
  endfunction

  function automatic logic [EB-1:0] rand_eb();
    return EB'(rand_w());
  endfunction

  initial begin
    #(20 * NOPS * (4 * L + (MP + 2) * (L + 4)));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NB-1:0] nv, av;
    logic [EB-1:0] ev;
    ex_t p3;
    real avg;
    for (int k = 0; k < 8; k++) m_sel[k] = 0;
    a = '0; e = '0; modulus = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int op = 0; op < int'(NOPS); op++) begin
      nv = rand_nb() | NB'(1);
      nv[NB-1] = 1'b1;
      av = rand_nb();
      ev = rand_eb();
      if (op % 2 == 1) begin
        // three equal thirds built from a short pattern whose recoding has
        // +1 and -1 digits: every nonzero digit is common
        p3 = ex_t'(rand_eb()) & ((ex_t'(1) << (MP - 3)) - 1);
        p3[0] = 1'b1; p3[1] = 1'b1; p3[2] = 1'b0;
        ev = EB'(p3 * ((ex_t'(1) << (2 * MP)) + (ex_t'(1) << MP) + 1));
      end
      if (op == 2) av = av & rand_nb() & rand_nb() & rand_nb();  // sparse base
      run_op(av, ev, nv);
    end
    avg = real'(tot_pairs) / real'(n_mults);
    $display("mean steps per multiplication %0.2f for L = %0d", avg, L);
    $display("mechanisms: +1 %0d, -1 %0d, limit pair %0d, KMAX shift %0d, common +1 %0d, common -1 %0d",
             m_pos, m_neg, m_zero_pair, m_kmax, m_com_p, m_com_n);
    $display("selected: C1 %0d C2 %0d C3 %0d C4 %0d D1 %0d D2 %0d D3 %0d D4 %0d",
             m_sel[0], m_sel[1], m_sel[2], m_sel[3], m_sel[4], m_sel[5], m_sel[6], m_sel[7]);
    checks++;
    if (avg < 0.30 * L || avg > 0.40 * L) begin
      failures++; $display("FAIL mean step count not near L/3");
    end
    if (MECH) begin
      checks++;
      if (m_pos == 0 || m_neg == 0 || m_zero_pair == 0 || m_kmax == 0 ||
          m_com_p == 0 || m_com_n == 0) begin
        failures++; $display("FAIL a mechanism never occurred");
      end
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (m_sel[k] == 0) begin failures++; $display("FAIL accumulator %0d never selected", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
