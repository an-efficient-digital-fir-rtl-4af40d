// csa_tree_tb: checks that the carry-save tree preserves the sum of its rows.
// Random rows are applied to trees of 1, 2, 3, 7 and 16 rows; sum + carry must equal the
// arithmetic sum of the rows modulo 2^W, computed here with plain integer addition.
module csa_tree_tb;
  localparam int W = 20;
  int checks = 0, failures = 0;

  logic [W-1:0] r1 [1];  logic [W-1:0] s1, c1;
  logic [W-1:0] r2 [2];  logic [W-1:0] s2, c2;
  logic [W-1:0] r3 [3];  logic [W-1:0] s3, c3;
  logic [W-1:0] r7 [7];  logic [W-1:0] s7, c7;
  logic [W-1:0] r16 [16]; logic [W-1:0] s16, c16;

  csa_tree #(.N(1),  .W(W)) u1  (.rows(r1),  .sum(s1),  .carry(c1));
  csa_tree #(.N(2),  .W(W)) u2  (.rows(r2),  .sum(s2),  .carry(c2));
  csa_tree #(.N(3),  .W(W)) u3  (.rows(r3),  .sum(s3),  .carry(c3));
  csa_tree #(.N(7),  .W(W)) u7  (.rows(r7),  .sum(s7),  .carry(c7));
  csa_tree #(.N(16), .W(W)) u16 (.rows(r16), .sum(s16), .carry(c16));

  task automatic check(string name, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", name, got, exp);
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
    logic [W-1:0] e;
    for (int t = 0; t < 2000; t++) begin
      foreach (r1[j])  r1[j]  = W'($urandom);
      foreach (r2[j])  r2[j]  = W'($urandom);
      foreach (r3[j])  r3[j]  = W'($urandom);
      foreach (r7[j])  r7[j]  = (t % 3 == 0) ? '1 : W'($urandom);
      foreach (r16[j]) r16[j] = (t % 5 == 0) ? '1 : W'($urandom);
      #1;
      e = '0; foreach (r1[j])  e += r1[j];  check("N=1",  s1 + c1,   e);
      e = '0; foreach (r2[j])  e += r2[j];  check("N=2",  s2 + c2,   e);
      e = '0; foreach (r3[j])  e += r3[j];  check("N=3",  s3 + c3,   e);
      e = '0; foreach (r7[j])  e += r7[j];  check("N=7",  s7 + c7,   e);
      e = '0; foreach (r16[j]) e += r16[j]; check("N=16", s16 + c16, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
