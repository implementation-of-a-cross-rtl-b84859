// decimator10 - anti-alias filter and downsampling by 10 for the two
// channels: a 5th-order CIC decimating by 5, then a 31-tap symmetric FIR
// decimating by 2 that flattens the CIC droop and sharpens the transition.
//
// The split of the factor 10 into CIC 5 x FIR 2 and the 31 symmetric taps are
// the arrangement that needs the fewest multipliers (two per channel with
// the 125 MHz clock against a 12.5 MHz output rate). Specification: at least
// 60 dB alias suppression, 0.1 dB pass-band flatness, pass band 75 % of the
// output Nyquist band. The CIC order and the coefficients are this design's
// (see xspec_pkg).
//
// Gain: the CIC gain 3125 and the FIR gain 4096/3125 give 2^12 at DC; the
// output keeps W_OUT - W_IN extra low bits, so a DC input x yields
// x * 2^(W_OUT-W_IN) at the output (saturated to W_OUT bits). The extra bits
// carry the resolution gained by removing 9/10 of the noise bandwidth.
// Timing: one out_valid per 10 in_valid, at most 12 clocks after the 10th.
// in_valid may be asserted every clock.
module decimator10
  import xspec_pkg::*;
#(
  parameter int W_IN  = 16,
  parameter int W_OUT = 18
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [W_IN-1:0]  in_a,
  input  logic signed [W_IN-1:0]  in_b,
  output logic                    out_valid,
  output logic signed [W_OUT-1:0] out_a,
  output logic signed [W_OUT-1:0] out_b
);
  localparam int WC = W_IN + CIC_GROW;

  logic                 cic_valid;
  logic signed [WC-1:0] cic_a, cic_b;

  cic_decimator #(.W_IN(W_IN), .W_OUT(WC)) u_cic (
    .clk, .rst, .in_valid, .in_a, .in_b,
    .out_valid(cic_valid), .out_a(cic_a), .out_b(cic_b)
  );

  fir_decimator #(.W_IN(WC), .W_OUT(W_OUT),
                  .SHIFT(COEF_FRAC + CIC_GROW - (W_OUT - W_IN))) u_fir (
    .clk, .rst, .in_valid(cic_valid), .in_a(cic_a), .in_b(cic_b),
    .out_valid, .out_a, .out_b
  );
endmodule
