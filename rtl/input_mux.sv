// input_mux - selects the source of the processing chain: the two ADC
// channels (sel = 0) or the test signal generator (sel = 1).
//
// The chosen pair is registered, so the output follows the inputs with one
// clock of latency. valid is low in reset and high from the first clock
// after it: the ADC delivers one sample pair per clock. The register stage
// and the valid flag are this design's choice.
module input_mux #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                sel,
  input  logic signed [W-1:0] adc_a,
  input  logic signed [W-1:0] adc_b,
  input  logic signed [W-1:0] tst_a,
  input  logic signed [W-1:0] tst_b,
  output logic signed [W-1:0] a,
  output logic signed [W-1:0] b,
  output logic                valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      a     <= '0;
      b     <= '0;
      valid <= 1'b0;
    end else begin
      a     <= sel ? tst_a : adc_a;
      b     <= sel ? tst_b : adc_b;
      valid <= 1'b1;
    end
  end
endmodule
