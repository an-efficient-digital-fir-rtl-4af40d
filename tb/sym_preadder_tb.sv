// sym_preadder_tb: random taps into a symmetric order-28 folder and an antisymmetric order-5
// folder; each output must equal the integer sum (or difference) of its tap pair, and the
// centre tap of the even order must pass through unchanged.
module sym_preadder_tb;
  localparam int W = 12;
  int checks = 0, failures = 0;

  logic signed [W-1:0] ta [29];
  logic signed [W:0]   pa [15];
  logic signed [W-1:0] tb5 [6];
  logic signed [W:0]   pb [3];

  sym_preadder #(.ORDER(28), .W(W), .ANTISYM(1'b0), .NC(15)) u_sym  (.taps(ta),  .pre(pa));
  sym_preadder #(.ORDER(5),  .W(W), .ANTISYM(1'b1), .NC(3))  u_anti (.taps(tb5), .pre(pb));

  task automatic check(string name, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", name, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      foreach (ta[i])  ta[i]  = (t < 2) ? ((t == 0) ? -12'sd2048 : 12'sd2047) : W'($urandom);
      foreach (tb5[i]) tb5[i] = (t < 2) ? ((i % 2 == t) ? -12'sd2048 : 12'sd2047) : W'($urandom);
      #1;
      for (int i = 0; i < 14; i++) check("sym", int'(pa[i]), int'(ta[i]) + int'(ta[28-i]));
      check("centre", int'(pa[14]), int'(ta[14]));
      for (int i = 0; i < 3; i++) check("anti", int'(pb[i]), int'(tb5[i]) - int'(tb5[5-i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
