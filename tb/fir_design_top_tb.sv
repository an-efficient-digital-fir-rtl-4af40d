// fir_design_top_tb: runs the whole design, at its default parameters, through one complete
// operation of each datapath.
//
//  - FIR filter (filter A): impulse response, 2000 random samples with random input gaps, and
//    the input pattern that saturates the output. Every output is compared with the exact
//    convolution (computed here from the unfolded coefficient list) and must be faithful,
//    i.e. within (-1, +1] ulp, and arrive two clock edges after its input.
//  - Truncated multipliers: 4000 random operand pairs; the unsigned and the signed result must
//    each lie within (-1, +1] ulp (ulp = 2^8) of the exact product, one clock edge later.
//  - Vedic multiplier: 4000 random operand pairs against the exact 16-bit product.
// The mechanisms counted, each of which must occur at least once: filter input gaps (held
// state), filter output saturation, filter results that differ from the nearest integer (the
// truncation error budget in use), signed multiplications with a negative operand.
module fir_design_top_tb;
  import fir_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic fir_in_valid = 1'b0, fir_out_valid, fir_sat;
  logic signed [11:0] fir_x = '0, fir_y;
  logic tm_in_valid = 1'b0, tm_out_valid;
  logic [7:0] tm_a = '0, tm_b = '0, tm_p_unsigned, tm_p_signed;
  logic [7:0] vm_a = '0, vm_b = '0;
  logic [15:0] vm_p;

  fir_design_top dut (.*);

  always #5 clk = ~clk;

  localparam int M = FILTER_A_ORDER;
  int hist [M+1];
  longint exp_y [$];
  int due [$];
  int tm_x [$], tm_y [$];
  int cycle = 0;
  int gaps = 0, sats = 0, not_nearest = 0, neg_mults = 0, fir_outs = 0, tm_outs = 0;

  function automatic int coef_full(int i);
    return FILTER_A_COEF[(i <= M / 2) ? i : M - i];
  endfunction

  always @(posedge clk) begin
    longint e, ex;
    int x, y;
    #1;
    cycle++;
    if (fir_out_valid) begin
      fir_outs++;
      checks++;
      if (due.size() == 0) failures++;
      else begin
        if (due.pop_front() != cycle) failures++;
        ex = exp_y.pop_front();
        if (fir_sat) begin
          sats++;
          if (!((fir_y == 12'sd2047 && ex > 2046 * 2048) || (fir_y == -12'sd2048 && ex < -2047 * 2048))) begin
            failures++;
            if (failures < 10) $display("FAIL fir saturation y=%0d exact=%0d", fir_y, ex);
          end
        end else begin
          e = longint'(fir_y) * 2048 - ex;
          if (e > 1024 || e < -1024) not_nearest++;
          if (!(e > -2048 && e <= 2048)) begin
            failures++;
            if (failures < 10) $display("FAIL fir y=%0d exact=%0d/2048", fir_y, ex);
          end
        end
      end
    end
    if (tm_out_valid) begin
      tm_outs++;
      checks += 2;
      if (tm_x.size() == 0) failures++;
      else begin
        x = tm_x.pop_front();
        y = tm_y.pop_front();
        e = longint'(tm_p_unsigned) * 256 - longint'(x * y);
        if (!(e > -256 && e <= 256)) failures++;
        x = int'($signed(8'(x)));
        y = int'($signed(8'(y)));
        if (x < 0 || y < 0) neg_mults++;
        e = longint'($signed(tm_p_signed)) * 256 - longint'(x * y);
        if (!(e > -256 && e <= 256)) begin
          failures++;
          if (failures < 10) $display("FAIL signed %0d*%0d -> %0d", x, y, $signed(tm_p_signed));
        end
      end
    end
  end

  task automatic step(bit fv, int fx, bit tv, int ta, int tb_);
    longint ea;
    fir_in_valid = fv;
    fir_x        = 12'(fx);
    tm_in_valid  = tv;
    tm_a         = 8'(ta);
    tm_b         = 8'(tb_);
    vm_a         = 8'($urandom);
    vm_b         = 8'($urandom);
    #1;
    checks++;
    if (int'(vm_p) != int'(vm_a) * int'(vm_b)) begin
      failures++;
      if (failures < 10) $display("FAIL vedic %0d*%0d -> %0d", vm_a, vm_b, vm_p);
    end
    @(posedge clk);
    if (fv) begin
      for (int i = M; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = fx;
      ea = 0;
      for (int i = 0; i <= M; i++) ea += longint'(coef_full(i)) * longint'(hist[i]);
      exp_y.push_back(ea);
      due.push_back(cycle + 2);
    end else gaps++;
    if (tv) begin
      tm_x.push_back(ta);
      tm_y.push_back(tb_);
    end
    #2;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[i]) hist[i] = 0;
    repeat (3) @(posedge clk);
    #2;
    rst_n = 1'b1;
    step(1'b1, 2047, 1'b1, 255, 255);
    for (int k = 0; k < M + 2; k++) step(1'b1, 0, 1'b1, 128, 128);
    for (int k = 0; k < 2000; k++)
      step(($urandom % 4) != 0, int'($signed(12'($urandom))), ($urandom % 3) != 0, int'($urandom % 256), int'($urandom % 256));
    for (int k = 0; k <= M; k++) step(1'b1, (coef_full(M - k) >= 0) ? 2047 : -2048, 1'b1, int'($urandom % 256), int'($urandom % 256));
    for (int k = 0; k < 2000; k++) step(1'b1, int'($signed(12'($urandom))) / 4, 1'b1, int'($urandom % 256), int'($urandom % 256));
    repeat (4) step(1'b0, 0, 1'b0, 0, 0);
    checks += 6;
    if (gaps == 0)        begin failures++; $display("FAIL no input gap"); end
    if (sats == 0)        begin failures++; $display("FAIL no saturation"); end
    if (not_nearest == 0) begin failures++; $display("FAIL error budget never used"); end
    if (neg_mults == 0)   begin failures++; $display("FAIL no negative operand"); end
    if (due.size() != 0 || tm_x.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    if (fir_outs < 3000 || tm_outs < 3000) begin failures++; $display("FAIL too few outputs"); end
    $display("fir outputs %0d (gaps %0d, saturated %0d, not nearest %0d); multiplier results %0d (%0d with a negative operand)",
             fir_outs, gaps, sats, not_nearest, tm_outs, neg_mults);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
