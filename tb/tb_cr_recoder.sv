// tb_cr_recoder: self-checking test of the canonical recoder.
// For edge values and random 64-bit inputs it checks that the digits are
// canonical (no +1 and -1 at one position, no two adjacent nonzero digits),
// that they add up to the input, and that they equal the non-adjacent form
// obtained independently from 3x and x: digit i = bit(i+1) of 3x - bit(i+1) of x.
module tb_cr_recoder;
  localparam int unsigned W = 64;

  logic [W-1:0] x;
  logic [W:0]   dpos, dneg;
  int checks = 0, failures = 0;

  cr_recoder #(.W(W)) dut (.x(x), .dpos(dpos), .dneg(dneg));

  task automatic check_one(input logic [W-1:0] v);
    logic [W+1:0] x3, xx;
    logic [W:0]   rp, rn;
    logic signed [W+2:0] sum;
    x = v;
    #1;
    xx = (W+2)'(v);
    x3 = xx + (xx << 1);
    rp = (W+1)'((x3 & ~xx) >> 1);
    rn = (W+1)'((~x3 & xx) >> 1);
    sum = '0;
    for (int i = 0; i <= W; i++) begin
      if (dpos[i]) sum += (W+3)'(1) << i;
      if (dneg[i]) sum -= (W+3)'(1) << i;
    end
    checks++;
    if (sum != $signed((W+3)'(v))) begin
      failures++; $display("FAIL value x=%h", v);
    end
    checks++;
    if ((dpos & dneg) != '0 || (((dpos | dneg) & ((dpos | dneg) >> 1)) != '0)) begin
      failures++; $display("FAIL not canonical x=%h", v);
    end
    checks++;
    if (dpos != rp || dneg != rn) begin
      failures++; $display("FAIL digits x=%h pos=%h neg=%h exp %h %h", v, dpos, dneg, rp, rn);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one('0);
    check_one('1);
    check_one('1 << (W - 1));
    
    check_one({W{1'b1}});
    check_one(W'(478));     // 111011110 -> 1000(-1)000(-1)0
    check_one(W'(3));
    for (int t = 0; t < 2000; t++) check_one({$urandom, $urandom});
    // the worked example: 478 = 111011110b = 2^9 - 2^5 - 2^1
    x = W'(478);
    #1;
    checks++;
    if (dpos != (W+1)'(1 << 9) || dneg != (W+1)'((1 << 5) | (1 << 1))) begin
      failures++; $display("FAIL 478 example");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
