// vedic_mult_tb: exhaustive check of the 8 x 8 and 4 x 4 Vedic multipliers against the
// integer product.
module vedic_mult_tb;
  int checks = 0, failures = 0;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;

  vedic_mult #(.N(8)) u8 (.a(a8), .b(b8), .p(p8));
  vedic_mult #(.N(4)) u4 (.a(a4), .b(b4), .p(p4));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        a4 = 4'(x); b4 = 4'(y);
        #1;
        checks++;
        if (int'(p8) != x * y) begin
          failures++;
          if (failures < 10) $display("FAIL 8x8 %0d*%0d got %0d", x, y, p8);
        end
        if (x < 16 && y < 16) begin
          checks++;
          if (int'(p4) != x * y) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
