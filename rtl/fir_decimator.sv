// fir_decimator - two-channel 31-tap symmetric FIR that decimates by 2 and
// compensates the droop of the preceding CIC.
//
// Every input strobe shifts one sample pair into a 31-deep delay line. After
// every second strobe the filter output is computed: in the next clock the
// symmetric taps are pre-added (h[t] = h[30-t], 16 folded terms), then two
// multiply-accumulates per channel and clock run for 8 clocks, so each
// channel uses two multipliers, the number the decimator's multiplier budget
// calls for. The result is scaled by 2^-SHIFT, rounded to nearest, saturated to W_OUT bits and
// presented with a one-clock out_valid, 10 clocks after the triggering
// in_valid. Inputs may arrive at most once every 5 clocks (the CIC output
// rate at 125 MHz); in_valid during the 9 busy clocks after a trigger is
// still accepted into the delay line, since the folded terms are held.
//
// y[i] = sum_{t=0..30} h[t] u[2i+1-t], u = input sequence from reset (u<0 = 0).
module fir_decimator
  import xspec_pkg::*;
#(
  parameter int W_IN  = 28,
  parameter int W_OUT = 18,
  parameter int SHIFT = 27
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
  localparam int PW  = W_IN + 1;               // pre-added term
  localparam int AW  = PW + COEF_W + 4;        // 16 products
  localparam int RW  = AW - SHIFT;             // width after the shift
  typedef logic signed [W_IN-1:0] samp_t;
  typedef logic signed [PW-1:0]   pre_t;
  typedef logic signed [AW-1:0]   acc_t;

  samp_t dl [2][FIR_TAPS];
  pre_t  fold [2][FIR_UNIQUE];
  acc_t  acc [2];
  logic  odd;          // next input completes an output pair
  logic  load;         // pre-add this clock
  logic  run;          // MAC in progress
  logic [2:0] step;

  function automatic logic signed [W_OUT-1:0] sat(acc_t v);
    logic signed [RW-1:0] s;
    s = RW'((v + (acc_t'(1) <<< (SHIFT - 1))) >>> SHIFT);
    if (s > RW'(signed'({1'b0, {(W_OUT-1){1'b1}}})))
      return {1'b0, {(W_OUT-1){1'b1}}};
    else if (s < -RW'(signed'({1'b0, {(W_OUT-1){1'b1}}})) - 1)
      return {1'b1, {(W_OUT-1){1'b0}}};
    else
      return W_OUT'(s);
  endfunction

  acc_t mac [2];
  always_comb begin
    for (int c = 0; c < 2; c++)
      mac[c] = acc[c]
             + acc_t'(fold[c][2*step]   * FIR_COEF[2*step])
             + acc_t'(fold[c][2*step+1] * FIR_COEF[2*step+1]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < 2; c++) begin
        for (int t = 0; t < FIR_TAPS; t++) dl[c][t] <= '0;
        for (int t = 0; t < FIR_UNIQUE; t++) fold[c][t] <= '0;
        acc[c] <= '0;
      end
      odd       <= 1'b0;
      load      <= 1'b0;
      run       <= 1'b0;
      step      <= '0;
      out_valid <= 1'b0;
      out_a     <= '0;
      out_b     <= '0;
    end else begin
      out_valid <= 1'b0;
      load      <= 1'b0;
      if (in_valid) begin
        dl[0][0] <= in_a;
        dl[1][0] <= in_b;
        for (int c = 0; c < 2; c++)
          for (int t = 1; t < FIR_TAPS; t++) dl[c][t] <= dl[c][t-1];
        odd <= ~odd;
        if (odd) load <= 1'b1;
      end
      if (load) begin
        for (int c = 0; c < 2; c++) begin
          for (int t = 0; t < FIR_UNIQUE - 1; t++)
            fold[c][t] <= pre_t'(dl[c][t]) + pre_t'(dl[c][FIR_TAPS-1-t]);
          fold[c][FIR_UNIQUE-1] <= pre_t'(dl[c][FIR_UNIQUE-1]);
          acc[c] <= '0;
        end
        run  <= 1'b1;
        step <= '0;
      end else if (run) begin
        acc[0] <= mac[0];
        acc[1] <= mac[1];
        step   <= step + 3'd1;
        if (step == 3'd7) begin
          run       <= 1'b0;
          out_a     <= sat(mac[0]);
          out_b     <= sat(mac[1]);
          out_valid <= 1'b1;
        end
      end
    end
  end
endmodule
