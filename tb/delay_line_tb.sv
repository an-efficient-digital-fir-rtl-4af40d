// delay_line_tb: drives the delay line with random samples and random enable gaps and
// compares every tap, every cycle, with a queue model; also checks that reset clears all taps.
module delay_line_tb;
  localparam int DEPTH = 6;
  localparam int W     = 8;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] din = '0;
  logic [W-1:0] taps [DEPTH];
  logic [W-1:0] model [DEPTH];
  int holds = 0;

  delay_line #(.DEPTH(DEPTH), .W(W)) dut (.clk, .rst_n, .en, .din, .taps);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    #1;
    foreach (taps[i]) begin
      checks++;
      if (taps[i] !== '0) failures++;
    end
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      en  = ($urandom % 4) != 0;
      din = W'($urandom);
      @(posedge clk);
      if (en) begin
        for (int i = DEPTH - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = din;
      end else holds++;
      #1;
      foreach (taps[i]) begin
        checks++;
        if (taps[i] !== model[i]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d tap %0d got %h expected %h", t, i, taps[i], model[i]);
        end
      end
    end
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
