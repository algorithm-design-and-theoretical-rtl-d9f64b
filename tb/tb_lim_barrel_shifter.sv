// tb_lim_barrel_shifter: checks the limited barrel shifter in its three
// configurations (left, logical right, arithmetic right) for every legal
// shift amount 0..MAXSH against the language's shift operators.
module tb_lim_barrel_shifter;
  localparam int unsigned W = 40;
  localparam int unsigned MAXSH = 7;

  logic [W-1:0] din, dl, dr, da;
  logic [2:0]   sh;
  int checks = 0, failures = 0;

  lim_barrel_shifter #(.W(W), .MAXSH(MAXSH), .LEFT(1'b1), .ARITH(1'b0)) u_l (.din, .sh, .dout(dl));
  lim_barrel_shifter #(.W(W), .MAXSH(MAXSH), .LEFT(1'b0), .ARITH(1'b0)) u_r (.din, .sh, .dout(dr));
  lim_barrel_shifter #(.W(W), .MAXSH(MAXSH), .LEFT(1'b0), .ARITH(1'b1)) u_a (.din, .sh, .dout(da));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      din = W'({$urandom, $urandom});
      if (t < 2) din = (t == 1) ? {W{1'b1}} : {1'b1, {(W-1){1'b0}}};
      for (int s = 0; s <= MAXSH; s++) begin
        sh = 3'(s);
        #1;
        checks++;
        if (dl != din << s || dr != din >> s || da != W'($signed(din) >>> s)) begin
          failures++;
          $display("FAIL din=%h sh=%0d l=%h r=%h a=%h", din, s, dl, dr, da);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
