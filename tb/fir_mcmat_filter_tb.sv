// fir_mcmat_filter_tb: end-to-end check of the linear-phase FIR filter.
//
// Two filters run side by side: filter A (the defaults: order 28, 12-bit samples, coefficients
// from fir_pkg) and a 3-tap smoother (order 2, coefficients 1/4, 1/2, 1/4). The testbench keeps
// its own copy of the input history and computes, for every accepted sample, the exact
// convolution sum_{i=0}^{M} a_i x[n-i] with the full (unfolded) coefficient list. Each output
// must arrive exactly two clock edges after its input and lie within (-1, +1] ulp of the exact
// value, or be clipped with sat_out set when the exact value lies outside the 12-bit range.
//
// Phases: impulse response; random samples with random gaps in in_valid; the worst-case input
// pattern that drives filter A into saturation; a stop-band tone (0.35 fs, must come out at
// least 40 dB down) and a pass-band tone (0.05 fs, must keep its amplitude).
module fir_mcmat_filter_tb;
  import fir_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [11:0] x_in = '0;
  logic               ov_a, sat_a, ov_3, sat_3;
  logic signed [11:0] y_a, y_3;

  localparam int C3 [2] = '{512, 1024};

  fir_mcmat_filter u_a (.clk, .rst_n, .in_valid, .x_in, .out_valid(ov_a), .y(y_a), .sat_out(sat_a));
  fir_mcmat_filter #(.ORDER(2), .NCOEF(2), .COEF(C3), .FRAC(11)) u_3 (
    .clk, .rst_n, .in_valid, .x_in, .out_valid(ov_3), .y(y_3), .sat_out(sat_3));

  always #5 clk = ~clk;

  localparam int M = FILTER_A_ORDER;
  int hist [M+1];
  longint exp_a [$], exp_3 [$];
  int     due [$];
  int     cycle = 0;
  int     bubbles = 0, sats = 0, outputs = 0;
  int     peak = 0;  // largest |y| seen since last reset of the measurement
  bit     measure = 0;

  function automatic int coef_full(int i);
    return FILTER_A_COEF[(i <= M / 2) ? i : M - i];
  endfunction

  task automatic check_out(string name, longint exact, int y, bit s);
    longint e;
    checks++;
    if (s) begin
      if (!((y == 2047 && exact > 2046 * 2048) || (y == -2048 && exact < -2047 * 2048))) begin
        failures++;
        if (failures < 10) $display("FAIL %s: bad saturation y=%0d exact=%0d", name, y, exact);
      end
    end else begin
      e = longint'(y) * 2048 - exact;
      if (!(e > -2048 && e <= 2048)) begin
        failures++;
        if (failures < 10) $display("FAIL %s cycle %0d: y=%0d exact=%0d/2048", name, cycle, y, exact);
      end
    end
  endtask

  // scoreboard: runs just after every rising edge
  always @(posedge clk) begin
    #1;
    cycle++;
    if (ov_a || ov_3) begin
      outputs++;
      checks++;
      if (due.size() == 0 || !ov_a || !ov_3) begin
        failures++;
        if (failures < 10) $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        if (due[0] != cycle) begin
          failures++;
          if (failures < 10) $display("FAIL latency: due %0d got %0d", due[0], cycle);
        end
        void'(due.pop_front());
        check_out("A", exp_a.pop_front(), int'(y_a), sat_a);
        check_out("3tap", exp_3.pop_front(), int'(y_3), sat_3);
        if (sat_a) sats++;
        if (measure && !sat_a) begin
          if (int'(y_a) > peak)  peak = int'(y_a);
          if (-int'(y_a) > peak) peak = -int'(y_a);
        end
      end
    end
  end

  task automatic send(int v, bit valid);
    longint ea, e3;
    in_valid = valid;
    x_in     = 12'(v);
    @(posedge clk);
    if (valid) begin
      for (int i = M; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = v;
      ea = 0;
      for (int i = 0; i <= M; i++) ea += longint'(coef_full(i)) * longint'(hist[i]);
      e3 = longint'(C3[0]) * hist[0] + longint'(C3[1]) * hist[1] + longint'(C3[0]) * hist[2];
      exp_a.push_back(ea);
      exp_3.push_back(e3);
      due.push_back(cycle + 2);  // scoreboard increments cycle after this edge
    end else bubbles++;
    #2;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int amp;
    foreach (hist[i]) hist[i] = 0;
    repeat (3) @(posedge clk);
    #2;
    rst_n = 1'b1;
    // impulse response
    send(1024, 1);
    for (int k = 0; k < M + 4; k++) send(0, 1);
    // random samples with gaps
    for (int k = 0; k < 3000; k++) send(int'($signed(12'($urandom))), ($urandom % 5) != 0);
    // worst case: x[n-i] = sign(a_i) * full scale, then the opposite sign
    for (int k = 0; k <= M; k++) send((coef_full(M - k) >= 0) ? 2047 : -2048, 1);
    for (int k = 0; k <= M; k++) send((coef_full(M - k) >= 0) ? -2048 : 2047, 1);
    // stop-band tone at 0.35 fs, amplitude 2000
    for (int k = 0; k < 300; k++) begin
      if (k == M + 4) measure = 1;
      send(int'($rtoi(2000.0 * $cos(2.0 * 3.14159265358979 * 0.35 * k))), 1);
    end
    repeat (4) send(0, 0);
    measure = 0;
    amp = peak;
    checks++;
    if (amp > 2000 / 100) begin
      failures++;
      $display("FAIL stop-band tone passed with amplitude %0d", amp);
    end
    $display("stop-band tone 2000 -> peak %0d", amp);
    // pass-band tone at 0.05 fs, amplitude 1000
    peak = 0;
    for (int k = 0; k < 300; k++) begin
      if (k == M + 4) measure = 1;
      send(int'($rtoi(1000.0 * $cos(2.0 * 3.14159265358979 * 0.05 * k))), 1);
    end
    repeat (4) send(0, 0);
    measure = 0;
    checks++;
    if (peak < 985 || peak > 1015) begin
      failures++;
      $display("FAIL pass-band tone 1000 came out as %0d", peak);
    end
    $display("pass-band tone 1000 -> peak %0d", peak);
    // every mechanism exercised
    checks += 3;
    if (bubbles == 0) failures++;
    if (sats == 0)    failures++;
    if (due.size() != 0) failures++;
    $display("outputs %0d, input gaps %0d, saturated outputs %0d", outputs, bubbles, sats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
