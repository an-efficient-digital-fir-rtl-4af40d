// trunc_mult_tb: exhaustive check of the 8 x 8 -> 8 truncated multipliers, unsigned and signed.
// For every operand pair the result p, scaled by one ulp (2^8), must lie within (-1, +1] ulp
// of the exact product, and it must appear exactly one clock edge after the operands. Also
// reports the largest error seen and checks that the deletion actually dropped enough to make
// the result differ from plain rounding at least once (so the error budget is being used).
module trunc_mult_tb;
  localparam int N = 8;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [N-1:0] a = '0, b = '0;
  logic ov_u, ov_s;
  logic [N-1:0] p_u, p_s;

  trunc_mult #(.N(N), .SIGNED(1'b0)) u_u (.clk, .rst_n, .in_valid, .a, .b, .out_valid(ov_u), .p(p_u));
  trunc_mult #(.N(N), .SIGNED(1'b1)) u_s (.clk, .rst_n, .in_valid, .a, .b, .out_valid(ov_s), .p(p_s));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int max_err_u = -1000, min_err_u = 1000, max_err_s = -1000, min_err_s = 1000;
  int not_nearest = 0;

  initial begin
    int eu, es, pu, ps;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a = N'(x); b = N'(y); in_valid = 1'b1;
        @(posedge clk);
        #1;
        checks += 2;
        if (!ov_u || !ov_s) failures++;
        pu = int'(p_u);
        ps = int'($signed(p_s));
        eu = pu * 256 - x * y;
        es = ps * 256 - int'($signed(N'(x))) * int'($signed(N'(y)));
        if (!(eu > -256 && eu <= 256)) begin
          failures++;
          if (failures < 10) $display("FAIL unsigned %0d*%0d -> %0d", x, y, pu);
        end
        if (!(es > -256 && es <= 256)) begin
          failures++;
          if (failures < 10) $display("FAIL signed %0d*%0d -> %0d", $signed(N'(x)), $signed(N'(y)), ps);
        end
        if (eu > max_err_u) max_err_u = eu;
        if (eu < min_err_u) min_err_u = eu;
        if (es > max_err_s) max_err_s = es;
        if (es < min_err_s) min_err_s = es;
        if (eu > 128 || eu < -128) not_nearest++;
      end
    end
    // latency: with in_valid low the output must not be flagged valid one edge later
    in_valid = 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (ov_u || ov_s) failures++;
    checks++;
    if (not_nearest == 0) failures++;
    $display("unsigned error range [%0d, %0d]/256 ulp, signed [%0d, %0d]/256 ulp, %0d results not nearest",
             min_err_u, max_err_u, min_err_s, max_err_s, not_nearest);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
