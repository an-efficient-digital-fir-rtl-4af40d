// mcmat_tb: checks the faithful-rounding guarantee of the truncated MCMA block.
// Instance A uses the default constants (filter A, 15 constants, 13-bit operands, 11
// fractional bits, 12-bit output); instance B uses a small hand-made constant set with negative
// and odd constants. For random and extreme operands the exact sum of products is computed here
// in 64-bit integers; the output, scaled by one ulp, must lie within (-1, +1] ulp of it, or be
// clipped to the output range with sat raised when the exact value lies beyond that range.
module mcmat_tb;
  import fir_pkg::*;
  int checks = 0, failures = 0;

  localparam int NA = FILTER_A_NCOEF;
  localparam int XA = SAMPLE_W + 1;
  logic signed [XA-1:0] xa [NA];
  logic signed [11:0]   ya;
  logic                 sa;

  localparam int NB = 4;
  localparam int CB [NB] = '{-93, 201, 7, -255};
  logic signed [9:0]  xb [NB];
  logic signed [7:0]  yb;
  logic               sb;

  mcmat u_a (.x(xa), .y(ya), .sat(sa));
  mcmat #(.N(NB), .XW(10), .COEF(CB), .FRAC(8), .OUTW(8)) u_b (.x(xb), .y(yb), .sat(sb));

  int sat_seen = 0, max_e = -100000, min_e = 100000;

  task automatic check(string name, longint exact, int y, bit s, int frac, int outw);
    longint ulp, e, ymax, ymin;
    ulp  = longint'(1) << frac;
    ymax = (longint'(1) << (outw - 1)) - 1;
    ymin = -(longint'(1) << (outw - 1));
    checks++;
    if (s) begin
      sat_seen++;
      if (!((longint'(y) == ymax && exact > (ymax - 1) * ulp) ||
            (longint'(y) == ymin && exact < (ymin + 1) * ulp))) begin
        failures++;
        if (failures < 10) $display("FAIL %s: bad saturation y=%0d exact=%0d", name, y, exact);
      end
    end else begin
      e = longint'(y) * ulp - exact;
      if (name == "A") begin
        if (int'(e) > max_e) max_e = int'(e);
        if (int'(e) < min_e) min_e = int'(e);
      end
      if (!(e > -ulp && e <= ulp)) begin
        failures++;
        if (failures < 10) $display("FAIL %s: y=%0d exact=%0d/%0d", name, y, exact, ulp);
      end
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ea, eb;
    for (int t = 0; t < 20000; t++) begin
      for (int i = 0; i < NA; i++) begin
        case (t % 8)
          0: xa[i] = (FILTER_A_COEF[i] >= 0) ? 13'sd4095 : -13'sd4096;   // largest positive sum
          1: xa[i] = (FILTER_A_COEF[i] >= 0) ? -13'sd4096 : 13'sd4095;   // largest negative sum
          2: xa[i] = XA'($signed(12'($urandom)));                          // small values
          default: xa[i] = XA'($urandom);
        endcase
      end
      foreach (xb[i]) xb[i] = 10'($urandom);
      #1;
      ea = 0;
      for (int i = 0; i < NA; i++) ea += longint'(FILTER_A_COEF[i]) * longint'(xa[i]);
      eb = 0;
      for (int i = 0; i < NB; i++) eb += longint'(CB[i]) * longint'(xb[i]);
      check("A", ea, int'(ya), sa, FILTER_A_FRAC, 12);
      check("B", eb, int'(yb), sb, 8, 8);
    end
    checks++;
    if (sat_seen == 0) failures++;
    $display("filter-A error range [%0d, %0d] / 2048 ulp, %0d saturated", min_e, max_e, sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
