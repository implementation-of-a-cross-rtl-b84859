// cic_decimator - two-channel cascaded integrator-comb decimator, order
// CIC_N = 5, rate CIC_R = 5, differential delay 1.
//
// Five integrators per channel run at the input strobe rate; every fifth
// input strobe the last integrator value is taken through five comb
// sections, all evaluated in that one cycle, and registered. No multipliers
// are used. Arithmetic is modulo 2^(W_IN+12), which the CIC relies on: the
// output is exact because the full gain 5^5 = 3125 < 2^12 fits.
//
// The transfer function is (sum_{m=0..4} z^-m)^5 sampled at every fifth
// input: output j equals sum_{m=0..20} h[m] x[5j - m] with h the 21-tap
// impulse response of the fivefold moving sum (x before reset taken as 0).
// Timing: out_valid pulses one clock after the 5th, 10th, ... in_valid.
// The order 5 is this design's choice; the rate 5 and the use of a CIC in
// front of a FIR follow the decimator specification.
module cic_decimator
  import xspec_pkg::*;
#(
  parameter int W_IN  = 16,
  parameter int W_OUT = W_IN + CIC_GROW
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
  typedef logic signed [W_OUT-1:0] acc_t;

  acc_t integ [2][CIC_N];
  acc_t comb_d [2][CIC_N];
  logic [2:0] phase;

  // Value of the last integrator after the current update, and the comb chain
  acc_t i_last [2];
  acc_t comb_y [2][CIC_N+1];

  always_comb begin
    for (int c = 0; c < 2; c++) begin
      i_last[c]    = integ[c][CIC_N-1] + integ[c][CIC_N-2];
      comb_y[c][0] = i_last[c];
      for (int k = 0; k < CIC_N; k++)
        comb_y[c][k+1] = comb_y[c][k] - comb_d[c][k];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < 2; c++)
        for (int k = 0; k < CIC_N; k++) begin
          integ[c][k]  <= '0;
          comb_d[c][k] <= '0;
        end
      phase     <= '0;
      out_valid <= 1'b0;
      out_a     <= '0;
      out_b     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        integ[0][0] <= integ[0][0] + acc_t'(in_a);
        integ[1][0] <= integ[1][0] + acc_t'(in_b);
        for (int c = 0; c < 2; c++)
          for (int k = 1; k < CIC_N; k++)
            integ[c][k] <= integ[c][k] + integ[c][k-1];
        if (phase == 3'(CIC_R - 1)) begin
          phase <= '0;
          for (int c = 0; c < 2; c++)
            for (int k = 0; k < CIC_N; k++)
              comb_d[c][k] <= comb_y[c][k];
          out_a     <= comb_y[0][CIC_N];
          out_b     <= comb_y[1][CIC_N];
          out_valid <= 1'b1;
        end else begin
          phase <= phase + 3'd1;
        end
      end
    end
  end
endmodule
