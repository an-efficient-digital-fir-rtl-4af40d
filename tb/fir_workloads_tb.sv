// fir_workloads_tb: runs the two larger filters of the published comparison, B and C, through
// the same filter RTL by overriding its parameters, and checks faithful rounding on each.
//
//  - Filter B: low-pass, order 64 (33 distinct coefficients), 15 fractional coefficient bits,
//    band edges 0.02 fs / 0.07 fs, 0.2 dB ripple, 60 dB stop band.
//  - Filter C: high-pass, order 121 (61 distinct coefficients, antisymmetric, a_i = -a_(M-i)),
//    19 fractional coefficient bits, band edges 0.37 fs / 0.40 fs, 0.1 dB ripple, 80 dB.
// Both use 12-bit input and output samples. The coefficient sets are equiripple designs to
// those specifications, uniformly quantized (B reaches 66 dB, C 84 dB; their largest
// coefficients need 12 and 17 bits besides the sign).
//
// Every output is compared with the exact convolution computed here from the unfolded
// coefficient list: it must lie within (-1, +1] ulp, or be clipped with sat_out set when the
// exact value lies outside the 12-bit range, and arrive two clock edges after its input. A
// pass-band tone must keep its amplitude and a stop-band tone must be removed.
module fir_workloads_tb;
  int checks = 0, failures = 0;

  localparam int MB = 64;
  localparam int NB = 33;
  localparam int CB [NB] = '{
    10, 10, 13, 15, 15, 10, 1, -16, -39, -70, -108, -150, -194, -235, -268, -286, -283, -252,
    -186, -82, 63, 249, 474, 731, 1013, 1309, 1605, 1888, 2144, 2359, 2522, 2623, 2658
  };
  localparam int MC = 121;
  localparam int NC = 61;
  localparam int CC [NC] = '{
    48, -103, 170, -209, 178, -50, -165, 409, -588, 604, -409, 44, 357, -611, 566, -189, -394,
    925, -1117, 801, -34, -881, 1508, -1475, 678, 612, -1822, 2321, -1729, 163, 1742, -3072,
    3053, -1475, -1110, 3545, -4563, 3418, -345, -3401, 6016, -5978, 2864, 2253, -7102, 9150,
    -6834, 515, 7347, -13021, 13094, -6204, -5860, 18285, -24708, 19594, -618, -29930, 65366,
    -96527, 114731
  };

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [11:0] x_in = '0;
  logic ov_b, sat_b, ov_c, sat_c;
  logic signed [11:0] y_b, y_c;

  fir_mcmat_filter #(.ORDER(MB), .NCOEF(NB), .COEF(CB), .FRAC(15), .ANTISYM(1'b0)) u_b (
    .clk, .rst_n, .in_valid, .x_in, .out_valid(ov_b), .y(y_b), .sat_out(sat_b));
  fir_mcmat_filter #(.ORDER(MC), .NCOEF(NC), .COEF(CC), .FRAC(19), .ANTISYM(1'b1)) u_c (
    .clk, .rst_n, .in_valid, .x_in, .out_valid(ov_c), .y(y_c), .sat_out(sat_c));

  always #5 clk = ~clk;

  int hist [MC+1];
  longint exp_b [$], exp_c [$];
  int due [$];
  int cycle = 0, sats = 0, outputs = 0, peak_b = 0, peak_c = 0;
  bit measure = 0;

  function automatic longint coef_b(int i);
    return longint'(CB[(i <= MB / 2) ? i : MB - i]);
  endfunction
  function automatic longint coef_c(int i);
    return (i < NC) ? longint'(CC[i]) : -longint'(CC[MC - i]);
  endfunction

  task automatic check_out(string name, longint exact, int y, bit s, int frac);
    longint e, ulp;
    ulp = longint'(1) << frac;
    checks++;
    if (s) begin
      sats++;
      if (!((y == 2047 && exact > 2046 * ulp) || (y == -2048 && exact < -2047 * ulp))) begin
        failures++;
        if (failures < 10) $display("FAIL %s: bad saturation y=%0d exact=%0d", name, y, exact);
      end
    end else begin
      e = longint'(y) * ulp - exact;
      if (!(e > -ulp && e <= ulp)) begin
        failures++;
        if (failures < 10) $display("FAIL %s: y=%0d exact=%0d/%0d", name, y, exact, ulp);
      end
    end
  endtask

  always @(posedge clk) begin
    #1;
    cycle++;
    if (ov_b || ov_c) begin
      outputs++;
      checks++;
      if (due.size() == 0 || !ov_b || !ov_c) failures++;
      else begin
        if (due.pop_front() != cycle) failures++;
        check_out("B", exp_b.pop_front(), int'(y_b), sat_b, 15);
        check_out("C", exp_c.pop_front(), int'(y_c), sat_c, 19);
        if (measure) begin
          if (int'(y_b) > peak_b) peak_b = int'(y_b);
          if (int'(y_c) > peak_c) peak_c = int'(y_c);
        end
      end
    end
  end

  task automatic send(int v, bit valid);
    longint eb, ec;
    in_valid = valid;
    x_in     = 12'(v);
    @(posedge clk);
    if (valid) begin
      for (int i = MC; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = v;
      eb = 0;
      ec = 0;
      for (int i = 0; i <= MB; i++) eb += coef_b(i) * longint'(hist[i]);
      for (int i = 0; i <= MC; i++) ec += coef_c(i) * longint'(hist[i]);
      exp_b.push_back(eb);
      exp_c.push_back(ec);
      due.push_back(cycle + 2);
    end
    #2;
  endtask

  task automatic tone(real f, real amp);
    peak_b = 0;
    peak_c = 0;
    for (int k = 0; k < 600; k++) begin
      if (k == MC + 4) measure = 1;
      send(int'($rtoi(amp * $cos(2.0 * 3.14159265358979 * f * k))), 1);
    end
    repeat (3) send(0, 0);
    measure = 0;
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
    for (int k = 0; k < 3000; k++) send(int'($signed(12'($urandom))), ($urandom % 6) != 0);
    tone(0.01, 1500.0);   // B pass band, C stop band
    checks += 2;
    if (peak_b < 1460 || peak_b > 1520) begin failures++; $display("FAIL B pass band %0d", peak_b); end
    if (peak_c > 2) begin failures++; $display("FAIL C stop band %0d", peak_c); end
    $display("tone 0.01 fs, amplitude 1500: B %0d, C %0d", peak_b, peak_c);
    tone(0.45, 1500.0);   // B stop band, C pass band
    checks += 2;
    if (peak_b > 3) begin failures++; $display("FAIL B stop band %0d", peak_b); end
    if (peak_c < 1460 || peak_c > 1520) begin failures++; $display("FAIL C pass band %0d", peak_c); end
    $display("tone 0.45 fs, amplitude 1500: B %0d, C %0d", peak_b, peak_c);
    checks++;
    if (due.size() != 0) failures++;
    $display("outputs %0d, saturated %0d", outputs, sats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
