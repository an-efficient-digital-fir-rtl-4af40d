// trunc_mult: faithfully rounded fixed-width (truncated) multiplier, N x N -> N bits.
//
// Returns the upper N bits of a*b, p = a*b / 2^N, with an error in (-1, +1] ulp, while
// building only part of the partial-product matrix. It applies to a single multiplication the
// same deletion-and-rounding scheme as the filter's MCMAT block:
//
//  - Partial products: unsigned operands give the plain AND array, row j = a & b[j] at weight
//    2^j. Signed (two's-complement) operands use the Baugh-Wooley form: the bits a[i]b[j] with
//    exactly one of i, j equal to N-1 are complemented, and the constant 2^N - 2^(2N-1) goes
//    into the bias row, so no sign extension is needed.
//  - Deletion: the ulp is 2^N. Whole low columns, then the lowest-index bits of the next
//    column, are left out as long as their largest possible sum stays at or below 1 ulp.
//  - Rounding: the bias row adds 2^N (1/2 ulp to centre the deletion error, 1/2 ulp for
//    rounding); after carry-save compression (csa_tree) and the final addition the columns
//    below N are dropped.
//
// Interface and timing: a and b with in_valid high are multiplied combinationally and the
// product is registered; p and out_valid appear one clock edge later. Synchronous active-low
// reset. The registered interface and the choice of the improved (deletion + rounding) scheme
// for the stand-alone multiplier are this design's own reading; the 8-bit size and the signed
// and unsigned versions follow the published multiplier results.
// The low N bits of the final sum only supply carries, so lint reports them as unused.
module trunc_mult #(
  parameter int N      = 8,     // operand and result width
  parameter bit SIGNED = 1'b0   // 1: two's-complement operands and result
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         out_valid,
  output logic [N-1:0] p
);

  localparam int PW = 2 * N;

  // Number of low bits deleted from each row j (row j spans columns j .. j+N-1).
  typedef logic [N-1:0][7:0] del_tab_t;

  function automatic del_tab_t build_del();
    del_tab_t dt;
    int       cnt [PW];
    longint   budget, used;
    int       dcol, k, rank, nd;
    dt = '0;
    for (int c = 0; c < PW; c++) cnt[c] = 0;
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++) cnt[i + j]++;
    budget = longint'(1) << N;
    used   = 0;
    dcol   = 0;
    while (dcol < PW && used + (longint'(cnt[dcol]) << dcol) <= budget) begin
      used += longint'(cnt[dcol]) << dcol;
      dcol++;
    end
    k    = (dcol < PW) ? int'((budget - used) >> dcol) : 0;
    rank = 0;
    for (int j = 0; j < N; j++) begin
      nd = dcol - j;
      if (nd < 0) nd = 0;
      if (nd > N) nd = N;
      if (j <= dcol && dcol <= j + N - 1) begin
        if (rank < k) nd++;
        rank++;
      end
      dt[j] = 8'(nd);
    end
    return dt;
  endfunction

  localparam del_tab_t DEL = build_del();

  function automatic logic [PW-1:0] build_bias();
    logic [PW-1:0] bias;
    bias = PW'(longint'(1) << N);
    if (SIGNED) bias = bias + PW'(longint'(1) << N) - PW'(longint'(1) << (PW - 1));
    return bias;
  endfunction

  localparam logic [PW-1:0] BIAS = build_bias();

  logic [PW-1:0] pp [N+1];

  for (genvar j = 0; j < N; j++) begin : g_row
    localparam logic [N-1:0] KEEP = ~((N'(1) << int'(DEL[j])) - N'(1));
    logic [N-1:0] bits;
    always_comb begin
      bits = a & {N{b[j]}};
      if (SIGNED) begin
        if (j == N - 1) bits[N-2:0] = ~bits[N-2:0];
        else            bits[N-1]   = ~bits[N-1];
      end
    end
    assign pp[j] = PW'(bits & KEEP) << j;
  end
  assign pp[N] = BIAS;

  logic [PW-1:0] cs_sum, cs_carry, total;

  csa_tree #(.N(N + 1), .W(PW)) u_csa (
    .rows (pp),
    .sum  (cs_sum),
    .carry(cs_carry)
  );

  assign total = cs_sum + cs_carry;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) p <= total[PW-1:N];
    end
  end

  // Handshake rule: a result is valid exactly one edge after its operands.
  a_latency : assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid == $past(in_valid));

endmodule
