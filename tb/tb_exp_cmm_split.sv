// tb_exp_cmm_split: checks the exponent digit unit.
// The per-iteration selects are gathered into eight integers (positive and
// negative digits of E_common and of E1,c .. E3,c). Checks: selects are
// exclusive as required; a common digit never coexists with a part digit;
// the rebuilt value
//   (Ec+ - Ec-) * (2^(2MP) + 2^MP + 1) + sum_j 2^(w_j) * (Ej+ - Ej-)
// equals E; and a non-common position is never one where all three digits
// agree. Includes an exponent made of three equal thirds (all digits common).
module tb_exp_cmm_split;
  localparam int unsigned EB = 30;
  localparam int unsigned MP = (EB + 3) / 3;

  logic clk = 0, rst_n = 0, load = 0, adv = 0;
  logic [EB-1:0] e;
  logic [3:0] mul_c, mul_d;
  int checks = 0, failures = 0;
  int n_com_p = 0, n_com_n = 0;

  exp_cmm_split #(.EB(EB)) dut (.clk, .rst_n, .load, .e, .adv, .mul_c, .mul_d);

  always #5 clk = ~clk;

  task automatic run_one(input logic [EB-1:0] ev);
    longint pc [4], nc [4];
    longint rebuilt;
    bit bad;
    for (int j = 0; j < 4; j++) begin pc[j] = 0; nc[j] = 0; end
    bad = 0;
    @(negedge clk);
    e = ev; load = 1;
    @(negedge clk);
    load = 0;
    for (int i = 0; i < int'(MP); i++) begin
      if ((mul_c & mul_d) != 0) bad = 1;
      if ((mul_c[0] || mul_d[0]) && (mul_c[3:1] != 0 || mul_d[3:1] != 0)) bad = 1;
      if ((mul_c[3:1] == 3'b111) || (mul_d[3:1] == 3'b111)) bad = 1;
      if (mul_c[0]) n_com_p++;
      if (mul_d[0]) n_com_n++;
      for (int j = 0; j < 4; j++) begin
        if (mul_c[j]) pc[j] += longint'(1) << i;
        if (mul_d[j]) nc[j] += longint'(1) << i;
      end
      adv = 1;
      @(negedge clk);
      adv = 0;
    end
    rebuilt = (pc[0] - nc[0]) * ((longint'(1) << (2*MP)) + (longint'(1) << MP) + 1)
            + ((pc[1] - nc[1]) << (2*MP)) + ((pc[2] - nc[2]) << MP) + (pc[3] - nc[3]);
    checks++;
    if (bad) begin failures++; $display("FAIL select rule e=%h", ev); end
    checks++;
    if (rebuilt != longint'(ev)) begin
      failures++; $display("FAIL rebuild e=%h got %h", ev, rebuilt);
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
    longint p;
    e = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // three equal thirds: p has a short NAF (1 0 -1 ...), all digits common
    p = 64'b0111011;  // NAF 100-10-1... fits well below MP-1 digits
    run_one(EB'(p * ((longint'(1) << (2*MP)) + (longint'(1) << MP) + 1)));
    run_one('0);
    run_one('1);
    for (int t = 0; t < 500; t++) run_one(EB'($urandom));
    checks++;
    if (n_com_p == 0 || n_com_n == 0) begin
      failures++; $display("FAIL common digits not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
