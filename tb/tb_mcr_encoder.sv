// tb_mcr_encoder: checks the MCR pair stream.
// For each operand the pairs are collected and checked: every zero count is
// at most KMAX, the digit positions add up to exactly NB+1, the signed digits
// rebuild the operand, nonzero digits are never adjacent, and the number of
// pairs (one per clock) equals the count from an independent greedy model of
// the non-adjacent form obtained as (3x - x)/2. The worked example 478 must
// start with the pairs (1, -1), (3, -1), (3, +1).
module tb_mcr_encoder;
  import cmm_pkg::*;
  localparam int unsigned NB = 64;
  localparam int unsigned KMAX = 6;
  localparam int unsigned L = NB + 1;

  logic clk = 0, rst_n = 0, load = 0, adv = 0, valid;
  logic [NB-1:0] x;
  mcr_pair_t pair;
  int checks = 0, failures = 0;
  int n_zero_pairs = 0, n_kmax = 0;

  mcr_encoder #(.NB(NB), .KMAX(KMAX)) dut (.clk, .rst_n, .load, .x, .adv, .valid, .pair);

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

  task automatic run_one(input logic [NB-1:0] v, input bit ex478);
    logic signed [NB+2:0] acc;
    int pos, npairs, prevnz;
    bit bad;
    @(negedge clk);
    x = v; load = 1;
    @(negedge clk);
    load = 0; adv = 1;
    acc = '0; pos = 0; npairs = 0; prevnz = -5; bad = 0;
    while (valid) begin
      if (int'(pair.k) > KMAX) bad = 1;
      if (pair.z == SD_ZERO) n_zero_pairs++;
      else if (int'(pair.k) == KMAX) n_kmax++;
      if (ex478) begin
        if (npairs == 0 && !(pair.k == 1 && pair.z == SD_NEG)) bad = 1;
        if (npairs == 1 && !(pair.k == 3 && pair.z == SD_NEG)) bad = 1;
        if (npairs == 2 && !(pair.k == 3 && pair.z == SD_POS)) bad = 1;
      end
      if (pair.z != SD_ZERO) begin
        if (pos + int'(pair.k) == prevnz + 1) bad = 1;
        prevnz = pos + int'(pair.k);
        if (pair.z == SD_POS) acc += (NB+3)'(1) << (pos + int'(pair.k));
        else                  acc -= (NB+3)'(1) << (pos + int'(pair.k));
      end
      pos += int'(pair.k) + 1;
      npairs++;
      if (pair.last != (pos == L)) bad = 1;
      @(negedge clk);
      if (npairs > L) break;
    end
    adv = 0;
    checks++;
    if (bad || pos != L) begin
      failures++; $display("FAIL pair format x=%h pos=%0d", v, pos);
    end
    checks++;
    if (acc != $signed((NB+3)'(v))) begin
      failures++; $display("FAIL value x=%h got %h", v, acc);
    end
    checks++;
    if (npairs != model_pairs(v)) begin
      failures++; $display("FAIL pair count x=%h got %0d exp %0d", v, npairs, model_pairs(v));
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_one(NB'(478), 1'b1);
    run_one('0, 1'b0);
    run_one({NB{1'b1}}, 1'b0);
    run_one(NB'(64'h8000_0000_0000_0001), 1'b0);
    run_one(NB'(64'h5555_5555_5555_5555), 1'b0);
    for (int t = 0; t < 300; t++) run_one({$urandom, $urandom}, 1'b0);
    checks++;
    if (n_zero_pairs == 0 || n_kmax == 0) begin
      failures++; $display("FAIL zero-run limit never exercised");
    end
    $display("zero pairs %0d, k=KMAX pairs %0d", n_zero_pairs, n_kmax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
