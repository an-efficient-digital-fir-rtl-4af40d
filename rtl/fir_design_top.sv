// fir_design_top: the faithfully rounded FIR filter with the stand-alone multipliers beside it.
//
// Three independent datapaths share the clock and reset and bring out their own ports:
//  - fir_*: the linear-phase direct-form FIR filter (fir_mcmat_filter, filter A by default):
//    12-bit samples in, faithfully rounded 12-bit samples out, two clock edges of latency,
//    up to one sample per clock.
//  - tm_*: the faithfully rounded truncated multiplier (trunc_mult), 8 x 8 -> 8 bits, in an
//    unsigned and a signed (two's-complement) version fed by the same operands; result one clock
//    edge after the operands.
//  - vm_*: the Vedic (vertical and crosswise) multiplier (vedic_mult), 8 x 8 -> 16 bits,
//    combinational.
// The filter is the main design; the two multipliers are the multiplier circuits evaluated next
// to it and do not feed it (the filter multiplies only by constants).
module fir_design_top
  import fir_pkg::*;
#(
  parameter int MW = 8   // multiplier operand width
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // FIR filter
  input  logic                       fir_in_valid,
  input  logic signed [SAMPLE_W-1:0] fir_x,
  output logic                       fir_out_valid,
  output logic signed [SAMPLE_W-1:0] fir_y,
  output logic                       fir_sat,
  // truncated multipliers
  input  logic                       tm_in_valid,
  input  logic [MW-1:0]              tm_a,
  input  logic [MW-1:0]              tm_b,
  output logic                       tm_out_valid,
  output logic [MW-1:0]              tm_p_unsigned,
  output logic [MW-1:0]              tm_p_signed,
  // Vedic multiplier
  input  logic [MW-1:0]              vm_a,
  input  logic [MW-1:0]              vm_b,
  output logic [2*MW-1:0]            vm_p
);

  fir_mcmat_filter u_fir (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (fir_in_valid),
    .x_in     (fir_x),
    .out_valid(fir_out_valid),
    .y        (fir_y),
    .sat_out  (fir_sat)
  );

  logic tm_valid_s;

  trunc_mult #(.N(MW), .SIGNED(1'b0)) u_tm_unsigned (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (tm_in_valid),
    .a        (tm_a),
    .b        (tm_b),
    .out_valid(tm_out_valid),
    .p        (tm_p_unsigned)
  );

  trunc_mult #(.N(MW), .SIGNED(1'b1)) u_tm_signed (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (tm_in_valid),
    .a        (tm_a),
    .b        (tm_b),
    .out_valid(tm_valid_s),
    .p        (tm_p_signed)
  );

  // Both multipliers see the same in_valid, so their valid outputs are identical.
  always_comb assert (tm_valid_s == tm_out_valid);

  vedic_mult #(.N(MW)) u_vedic (
    .a(vm_a),
    .b(vm_b),
    .p(vm_p)
  );

endmodule
