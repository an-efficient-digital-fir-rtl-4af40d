// fir_mcmat_filter: linear-phase direct-form FIR filter with faithfully rounded outputs.
//
//   y[n] = round_faithful( sum_{i=0}^{M} a_i * x[n-i] ),  a_i = a_{M-i} (or -a_{M-i})
//
// Structure (direct form): a delay line holds x[n] .. x[n-M]; symmetric pre-adders fold it
// onto the N = M/2 + 1 distinct coefficients; one MCMAT block (mcmat) multiplies the N folded
// samples by their constants and accumulates all products in a single truncated partial-product
// matrix, giving an OUTW-bit output whose error, relative to the exact result with the quantized
// coefficients, lies in (-1, +1] ulp. The delay line stores only input-width samples, which is
// why the direct form needs fewer flip-flops than the transposed form.
//
// Interface and timing: one sample per clock at most. A sample on x_in with in_valid high is
// taken into the delay line at a clock edge; the output y for it is registered at the next
// edge and out_valid is high for that one cycle. Latency is therefore two clock edges from
// input to output. With in_valid low the filter holds its state and out_valid goes low.
// sat_out flags an output that was clipped to the OUTW-bit range. Synchronous active-low reset.
//
// Defaults are filter A: order 28, 12-bit input and output, coefficients with 11 fractional
// bits (fir_pkg). The direct form, pre-adders, faithful MCMAT and the widths follow the filter's
// design; the registers at input and output, the valid handshake and saturation are this
// design's own choices.
module fir_mcmat_filter
  import fir_pkg::*;
#(
  parameter int ORDER        = FILTER_A_ORDER,
  parameter int NCOEF        = FILTER_A_NCOEF,   // must equal ORDER/2 + 1
  parameter int COEF [NCOEF] = FILTER_A_COEF,    // a_0 .. a_{NCOEF-1}, units of 2^-FRAC
  parameter int FRAC         = FILTER_A_FRAC,
  parameter bit ANTISYM      = 1'b0,
  parameter int XW           = SAMPLE_W,         // input width
  parameter int OUTW         = SAMPLE_W          // output width
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [XW-1:0]   x_in,
  output logic                   out_valid,
  output logic signed [OUTW-1:0] y,
  output logic                   sat_out
);

  if (NCOEF != ORDER / 2 + 1) begin : g_chk_ncoef
    $error("fir_mcmat_filter: NCOEF must equal ORDER/2 + 1");
  end

  logic [XW-1:0]        taps_u [ORDER+1];
  logic signed [XW-1:0] taps   [ORDER+1];
  logic signed [XW:0]   pre    [NCOEF];
  logic signed [OUTW-1:0] y_c;
  logic                 sat_c;
  logic                 v1;

  delay_line #(.DEPTH(ORDER + 1), .W(XW)) u_delay (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (in_valid),
    .din  (x_in),
    .taps (taps_u)
  );

  for (genvar i = 0; i <= ORDER; i++) begin : g_taps
    assign taps[i] = signed'(taps_u[i]);
  end

  sym_preadder #(.ORDER(ORDER), .W(XW), .ANTISYM(ANTISYM), .NC(NCOEF)) u_pre (
    .taps(taps),
    .pre (pre)
  );

  mcmat #(.N(NCOEF), .XW(XW + 1), .COEF(COEF), .FRAC(FRAC), .OUTW(OUTW)) u_mcmat (
    .x  (pre),
    .y  (y_c),
    .sat(sat_c)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
      y         <= '0;
      sat_out   <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      if (v1) begin
        y       <= y_c;
        sat_out <= sat_c;
      end
    end
  end

  // Handshake rule: an output is valid exactly two edges after a sample was accepted.
  a_latency : assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid == $past(in_valid, 2));

endmodule
