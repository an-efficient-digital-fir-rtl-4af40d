// sym_preadder: folds the delay line of a linear-phase FIR filter onto its distinct coefficients.
//
// A linear-phase filter of order M has a_i = a_{M-i} (symmetric) or a_i = -a_{M-i}
// (antisymmetric), so only N = M/2 + 1 (M even) or (M+1)/2 (M odd) coefficients are distinct.
// This block forms, for i < M/2, pre[i] = taps[i] + taps[M-i] (symmetric) or
// taps[i] - taps[M-i] (antisymmetric), one bit wider than the samples. For even M the centre
// tap taps[M/2] is passed on sign-extended as pre[M/2] (its coefficient is zero in the
// antisymmetric case). The multiply-accumulate stage then needs only N operands.
//
// Purely combinational. The folding follows the filter's linear-phase structure; the extra
// output bit is what keeps the sum exact.
module sym_preadder #(
  parameter int  ORDER   = 28,  // filter order M
  parameter int  W       = 12,  // sample width (signed)
  parameter bit  ANTISYM = 1'b0,
  parameter int  NC      = ORDER / 2 + 1  // number of distinct coefficients, derived from ORDER
) (
  input  logic signed [W-1:0] taps [ORDER+1],
  output logic signed [W:0]   pre  [NC]
);

  localparam int NPAIR = (ORDER + 1) / 2;

  if (NC != ORDER / 2 + 1) begin : g_chk_nc
    $error("sym_preadder: NC must equal ORDER/2 + 1");
  end

  for (genvar i = 0; i < NPAIR; i++) begin : g_pair
    if (ANTISYM) begin : g_sub
      assign pre[i] = (W+1)'(taps[i]) - (W+1)'(taps[ORDER-i]);
    end else begin : g_add
      assign pre[i] = (W+1)'(taps[i]) + (W+1)'(taps[ORDER-i]);
    end
  end

  if (ORDER % 2 == 0) begin : g_centre
    assign pre[ORDER/2] = (W+1)'(taps[ORDER/2]);
  end

endmodule
