// tb_mont_const: checks the Montgomery constants for random odd moduli:
// r1 = 2^(NB+1) mod M, r2 = 2^(2NB+2) mod M (wide remainder), mprime * M = -1
// (mod 2^(KMAX+1)), and that done arrives 2(NB+1) cycles after start.
module tb_mont_const;
  localparam int unsigned NB = 64;
  localparam int unsigned KMAX = 6;
  localparam int unsigned L = NB + 1;

  logic clk = 0, rst_n = 0, start = 0;
  logic [NB-1:0] modulus, r1, r2;
  logic [KMAX:0] mprime;
  logic busy, done;
  int checks = 0, failures = 0;

  mont_const #(.NB(NB), .KMAX(KMAX)) dut (.clk, .rst_n, .start, .modulus, .busy, .done,
    .r1, .r2, .mprime);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*L:0] one;
    logic [NB-1:0] m;
    int cyc;
    modulus = '0;
    one = '0; one[0] = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      m = {$urandom, $urandom} | NB'(1);
      if (t % 4 == 1) m = NB'({$urandom} | 3);
      if (t == 0) m = NB'(3);
      if (t == 2) m = '1;
      @(negedge clk);
      modulus = m; start = 1;
      @(negedge clk);
      start = 0; modulus = '0;
      cyc = 1;
      while (!done && cyc < 3 * L) begin @(negedge clk); cyc++; end
      checks++;
      if (r1 != NB'((one << L) % (2*L+1)'(m)) || r2 != NB'((one << (2*L)) % (2*L+1)'(m))) begin
        failures++; $display("FAIL m=%h r1=%h r2=%h", m, r1, r2);
      end
      checks++;
      if ((KMAX+1)'(mprime * m[KMAX:0] + 1) != '0) begin
        failures++; $display("FAIL mprime %h for m=%h", mprime, m);
      end
      checks++;
      if (cyc != 2 * L + 1) begin
        failures++; $display("FAIL latency %0d", cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
