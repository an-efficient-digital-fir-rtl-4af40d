// mcmat: faithfully rounded truncated multiple-constant multiplication/accumulation (MCMAT).
//
// Computes y = sum_i COEF[i] * x[i] / 2^FRAC, rounded to an integer with a total error below
// one unit in the last place (ulp) of y, without ever forming the individual products:
//
//  1. Partial-product generation. Every constant is recoded into signed digits (CSD or radix-4
//     Booth, whichever has fewer non-zero digits; see fir_pkg). Each non-zero digit d*2^p
//     becomes one row: the XW-bit operand x[i] shifted by p, subtracted when d < 0. All rows of
//     all constants form a single partial-product-bit (PPB) matrix.
//  2. Sign handling without sign extension. For a positive row the operand's sign bit is
//     complemented; for a negative row the other bits are complemented instead (two's-complement
//     negation). Using not(s) = 1 - s, the constants this leaves behind (-2^(XW-1+p) per row,
//     plus 2^p per negative row) are summed at elaboration time into one bias row, the last row.
//  3. Deletion. Column FRAC holds the output LSB, so 1 ulp = 2^FRAC. Starting at column 0,
//     whole columns of PPBs are deleted, and then the lowest-index bits of the next column, as
//     long as the largest possible value of the deleted bits stays at or below 1 ulp. The
//     deletion error therefore lies in [-1 ulp, 0].
//  4. Compression and rounding. The kept PPBs and the bias row are reduced to two rows by a
//     carry-save tree (csa_tree) and added by a carry-propagate adder. The bias row also holds
//     +1/2 ulp to centre the deletion error and +1/2 ulp to turn the final truncation of the
//     columns below FRAC into rounding. Deletion error is then in [-1/2, +1/2] ulp, rounding
//     error in (-1/2, +1/2] ulp, and the total in (-1, +1] ulp, i.e. faithful rounding.
//  5. The integer part is saturated to OUTW bits (sat = 1 when that happened).
//
// Steps 1-4 and the error budget (deletion plus rounding only, instead of the three-step
// deletion/truncation/rounding of earlier truncated multipliers) follow the filter's design.
// The deletion order inside a partially deleted column (lowest operand index first), doing
// the rounding by truncating the low columns of the final sum (rather than keeping a row of
// partial-product bits aside for it) and output saturation are this design's own choices.
// The carry-propagate adder also produces the columns below FRAC, which are then dropped;
// their carries are needed, so lint reports those bits as unused. Purely combinational.
module mcmat
  import fir_pkg::*;
#(
  parameter int N        = FILTER_A_NCOEF,           // number of operands / constants
  parameter int XW       = SAMPLE_W + 1,             // operand width (signed)
  parameter int COEF [N] = FILTER_A_COEF,            // constants, in units of 2^-FRAC
  parameter int FRAC     = FILTER_A_FRAC,            // fractional bits of the constants
  parameter int OUTW     = SAMPLE_W                  // output width (signed integer)
) (
  input  logic signed [XW-1:0]   x [N],
  output logic signed [OUTW-1:0] y,
  output logic                   sat
);

  // ---------------------------------------------------------------- elaboration-time matrix
  function automatic int num_rows();
    int n = 0;
    for (int i = 0; i < N; i++) n += sd_count(COEF[i]);
    return n;
  endfunction

  function automatic int sum_abs();
    int s = 0;
    for (int i = 0; i < N; i++) s += (COEF[i] < 0) ? -COEF[i] : COEF[i];
    return s;
  endfunction

  localparam int NR   = num_rows();
  localparam int SUMA = sum_abs();
  localparam int SW0  = XW + $clog2(SUMA + 1) + 2;
  localparam int SUMW = (SW0 > FRAC + OUTW + 1) ? SW0 : FRAC + OUTW + 1;

  typedef pp_row_t [NR-1:0] row_tab_t;
  typedef logic [NR-1:0][7:0] del_tab_t;

  function automatic row_tab_t build_rows();
    row_tab_t t;
    sd_form_t f;
    int       n = 0;
    t = '0;
    for (int i = 0; i < N; i++) begin
      f = sd_recode(COEF[i]);
      for (int p = 0; p <= SD_MAXP; p++) begin
        if (f.pos[p] || f.neg[p]) begin
          t[n].src   = 8'(i);
          t[n].shift = 8'(p);
          t[n].neg   = f.neg[p];
          n++;
        end
      end
    end
    return t;
  endfunction

  localparam row_tab_t ROWS = build_rows();

  // Number of low bits of each row that are deleted.
  function automatic del_tab_t build_del();
    del_tab_t dt;
    int       cnt [SUMW + XW + SD_MAXP + 2];
    longint   budget, used;
    int       dcol, k, rank, s, nd;
    dt = '0;
    foreach (cnt[c]) cnt[c] = 0;
    for (int r = 0; r < NR; r++)
      for (int b = 0; b < XW; b++) cnt[int'(ROWS[r].shift) + b]++;
    budget = longint'(1) << FRAC;
    used   = 0;
    dcol   = 0;
    while (dcol < SUMW && used + (longint'(cnt[dcol]) << dcol) <= budget) begin
      used += longint'(cnt[dcol]) << dcol;
      dcol++;
    end
    // bits of column dcol that still fit in the budget
    k    = (dcol < SUMW) ? int'((budget - used) >> dcol) : 0;
    rank = 0;
    for (int r = 0; r < NR; r++) begin
      s  = int'(ROWS[r].shift);
      nd = dcol - s;
      if (nd < 0)  nd = 0;
      if (nd > XW) nd = XW;
      if (s <= dcol && dcol <= s + XW - 1) begin
        if (rank < k) nd++;
        rank++;
      end
      dt[r] = 8'(nd);
    end
    return dt;
  endfunction

  localparam del_tab_t DEL = build_del();

  // Bias row: constants left by the sign handling, plus 1/2 ulp deletion compensation and
  // 1/2 ulp rounding constant (together 2^FRAC).
  function automatic logic [SUMW-1:0] build_bias();
    logic [SUMW-1:0] b;
    b = SUMW'(longint'(1) << FRAC);
    for (int r = 0; r < NR; r++) begin
      b = b - SUMW'(longint'(1) << (XW - 1 + int'(ROWS[r].shift)));
      if (ROWS[r].neg) b = b + SUMW'(longint'(1) << int'(ROWS[r].shift));
    end
    return b;
  endfunction

  localparam logic [SUMW-1:0] BIAS = build_bias();

  if (NR < 1) begin : g_chk_rows
    $error("mcmat: all constants are zero");
  end

  // ---------------------------------------------------------------- PPB matrix
  logic [SUMW-1:0] pp [NR+1];

  for (genvar r = 0; r < NR; r++) begin : g_row
    localparam int              SRC  = int'(ROWS[r].src);
    localparam int              SH   = int'(ROWS[r].shift);
    localparam bit              NEG  = ROWS[r].neg;
    localparam logic [XW-1:0]   KEEP = ~((XW'(1) << int'(DEL[r])) - XW'(1));
    logic [XW-1:0] bits;
    // positive row: sign bit complemented; negative row: all other bits complemented
    assign bits  = NEG ? {x[SRC][XW-1], ~x[SRC][XW-2:0]} : {~x[SRC][XW-1], x[SRC][XW-2:0]};
    assign pp[r] = SUMW'(bits & KEEP) << SH;
  end
  assign pp[NR] = BIAS;

  // ---------------------------------------------------------------- compression and CPA
  logic [SUMW-1:0] cs_sum, cs_carry, total;

  csa_tree #(.N(NR + 1), .W(SUMW)) u_csa (
    .rows (pp),
    .sum  (cs_sum),
    .carry(cs_carry)
  );

  assign total = cs_sum + cs_carry;

  // ---------------------------------------------------------------- rounding and saturation
  localparam int IW = SUMW - FRAC;
  logic signed [IW-1:0] yfull;
  assign yfull = signed'(total[SUMW-1:FRAC]);

  localparam logic signed [IW-1:0] YMAX = IW'((longint'(1) << (OUTW - 1)) - 1);
  localparam logic signed [IW-1:0] YMIN = -IW'(longint'(1) << (OUTW - 1));

  always_comb begin
    if (yfull > YMAX) begin
      y   = YMAX[OUTW-1:0];
      sat = 1'b1;
    end else if (yfull < YMIN) begin
      y   = YMIN[OUTW-1:0];
      sat = 1'b1;
    end else begin
      y   = yfull[OUTW-1:0];
      sat = 1'b0;
    end
  end

endmodule
