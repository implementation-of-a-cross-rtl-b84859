// xcorr_mult - complex multiplier forming one bin of the cross-spectrum,
// P(k) = X(k) * conj(Y(k)).
//
// Conjugating Y is done by negating its imaginary part before the product:
//   Re P = Xr Yr + Xi Yi,   Im P = Xi Yr - Xr Yi.
// Four full-precision multipliers and two adders, one result per clock,
// registered once: outputs follow inputs by one clock, with the bin index
// and the frame-end flag carried alongside. Output width 2W+1 cannot
// overflow.
module xcorr_mult #(
  parameter int W     = 28,
  parameter int LOG2N = 10
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic [LOG2N-1:0]     in_k,
  input  logic                 in_last,
  input  logic signed [W-1:0]  x_re,
  input  logic signed [W-1:0]  x_im,
  input  logic signed [W-1:0]  y_re,
  input  logic signed [W-1:0]  y_im,
  output logic                 out_valid,
  output logic [LOG2N-1:0]     out_k,
  output logic                 out_last,
  output logic signed [2*W:0]  p_re,
  output logic signed [2*W:0]  p_im
);
  localparam int PW = 2 * W + 1;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_k     <= '0;
      p_re      <= '0;
      p_im      <= '0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && in_last;
      out_k     <= in_k;
      // (Xr + jXi)(Yr + jYc) with Yc = -Yi; Yc is formed at width PW so that
      // negating the most negative Yi cannot overflow.
      p_re <= PW'(x_re) * PW'(y_re) - PW'(x_im) * (-PW'(y_im));
      p_im <= PW'(x_im) * PW'(y_re) + PW'(x_re) * (-PW'(y_im));
    end
  end
endmodule
