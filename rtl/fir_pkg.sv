// fir_pkg: constants and constant functions shared by the faithfully rounded FIR filter.
//
// Holds the quantized coefficient set of the default filter ("filter A": linear-phase low-pass
// of order 28, band edges 0.15 fs and 0.25 fs, 0.09 dB peak-to-peak pass-band ripple, 46 dB
// stop-band attenuation, 11 fractional coefficient bits) and the signed-digit recoding functions
// used at elaboration time to turn each constant into partial-product rows.
//
// The specification of filter A (order, band edges, ripple, B = 11 fractional bits) follows the
// published filter; the coefficient values themselves are this design's own: an equiripple design
// of the same order, quantized uniformly to 11 fractional bits and then non-uniformly (each
// coefficient's LSBs dropped while the specification still holds; nudging coefficients by one
// LSB freed no further bits). Only the N = M/2 + 1
// non-redundant coefficients a_0 .. a_{M/2} are stored, in units of 2^-11; the rest follow
// from symmetry a_i = a_{M-i}. The result reaches 46.2 dB and 0.088 dB ripple, and its largest
// coefficient needs 10 bits besides the sign, the effective word length of the published filter.
//
// Recoding: every constant is written as a sum of signed digits d_p * 2^p, d_p in {-1, 0, +1}.
// Two recodings are available, canonical signed digit (CSD) and radix-4 modified Booth (whose
// digit +-2 at 4^k is the signed digit +-1 at 2^(2k+1)); for each constant the one with fewer
// non-zero digits is used, CSD on a tie. Each non-zero digit becomes one partial-product row.
package fir_pkg;

  // Default filter (filter A)
  localparam int FILTER_A_ORDER = 28;
  localparam int FILTER_A_NCOEF = FILTER_A_ORDER / 2 + 1;
  localparam int FILTER_A_FRAC  = 11;
  localparam int FILTER_A_COEF [FILTER_A_NCOEF] = '{
    -4, -4, 8, 16, 0, -32, -24, 36, 76, 0, -136, -116, 186, 616, 820
  };

  // Input and output sample width of the default filter
  localparam int SAMPLE_W = 12;

  // Highest signed-digit position examined by the recoding functions
  localparam int SD_MAXP = 30;

  typedef enum logic {REC_CSD = 1'b0, REC_BOOTH4 = 1'b1} recode_e;

  // A signed-digit form: bit p of pos (neg) set means digit +1 (-1) at weight 2^p.
  typedef struct packed {
    logic [SD_MAXP:0] pos;
    logic [SD_MAXP:0] neg;
  } sd_form_t;

  // Canonical signed digit (non-adjacent) form of v, computed LSB first.
  function automatic sd_form_t csd_recode(int v);
    sd_form_t f;
    longint   x;
    f = '0;
    x = longint'(v);
    for (int p = 0; p <= SD_MAXP; p++) begin
      if (x[0]) begin
        if (x[1]) begin
          f.neg[p] = 1'b1;
          x = x + 1;
        end else begin
          f.pos[p] = 1'b1;
          x = x - 1;
        end
      end
      x = x >>> 1;
    end
    return f;
  endfunction

  // Radix-4 modified Booth form of v: Booth digit k is -2*b(2k+1) + b(2k) + b(2k-1); a digit
  // +-1 is placed at 2^(2k), a digit +-2 at 2^(2k+1).
  function automatic sd_form_t booth_recode(int v);
    sd_form_t f;
    longint   x;
    int       d;
    f = '0;
    x = longint'(v);
    for (int k = 0; 2 * k + 1 <= SD_MAXP; k++) begin
      d = -2 * int'(x[2*k+1]) + int'(x[2*k]) + ((k == 0) ? 0 : int'(x[2*k-1]));
      case (d)
        1:  f.pos[2*k]   = 1'b1;
        -1: f.neg[2*k]   = 1'b1;
        2:  f.pos[2*k+1] = 1'b1;
        -2: f.neg[2*k+1] = 1'b1;
        default: ;
      endcase
    end
    return f;
  endfunction

  function automatic int sd_weight(sd_form_t f);
    return $countones(f.pos) + $countones(f.neg);
  endfunction

  function automatic recode_e pick_recoding(int v);
    return (sd_weight(booth_recode(v)) < sd_weight(csd_recode(v))) ? REC_BOOTH4 : REC_CSD;
  endfunction

  // Signed-digit form of constant v under the recoding chosen for v.
  function automatic sd_form_t sd_recode(int v);
    return (pick_recoding(v) == REC_BOOTH4) ? booth_recode(v) : csd_recode(v);
  endfunction

  function automatic int sd_count(int v);
    return sd_weight(sd_recode(v));
  endfunction

  // One partial-product row of a constant multiplication: which operand it copies, its weight
  // 2^shift, and whether the digit is negative (row subtracted).
  typedef struct packed {
    logic [7:0] src;
    logic [7:0] shift;
    logic       neg;
  } pp_row_t;

endpackage
