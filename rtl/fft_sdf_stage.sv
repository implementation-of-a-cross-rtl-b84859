// fft_sdf_stage - one radix-2 decimation-in-frequency butterfly stage of the
// single-path delay-feedback FFT pipeline (stage S of LOG2N).
//
// The stage works on blocks of 2D samples, D = N / 2^(S+1). During the first
// D samples of a block the inputs are stored in a D-entry delay memory while
// the differences left there by the previous block leave, multiplied by the
// twiddle factor W_N^(j 2^S) (j = 0..D-1). The memory is addressed by
// j = in_pos mod D, so no pointer state is needed. During the second D samples each
// input x[n+D] meets its partner x[n] from the memory: the sum leaves at once
// and the difference is stored. Everything advances only on in_valid, so the
// stage is a pipeline in samples, not clocks: output = input position - D,
// plus one register. in_pos is the position (modulo N) of the current input
// within its frame, which the caller derives from a sample count.
// Widths: W_IN in, W_IN+1 out (one bit of growth per butterfly); twiddles
// are Q1.16 in 18 bits, rounded to nearest, computed at elaboration.
module fft_sdf_stage
  import xspec_pkg::*;
#(
  parameter int W_IN  = 17,
  parameter int LOG2N = 10,
  parameter int S     = 0
) (
  input  logic                   clk,
  input  logic                   in_valid,
  input  logic [LOG2N-1:0]       in_pos,
  input  logic signed [W_IN-1:0] in_re,
  input  logic signed [W_IN-1:0] in_im,
  output logic signed [W_IN:0]   out_re,
  output logic signed [W_IN:0]   out_im
);
  localparam int N     = 1 << LOG2N;
  localparam int D     = N >> (S + 1);
  localparam int TW_W  = 18;
  localparam int TW_F  = 16;
  localparam int WO    = W_IN + 1;
  localparam int PW    = WO + TW_W + 1;
  localparam int DA    = (D > 1) ? $clog2(D) : 1;

  typedef logic signed [TW_W-1:0] tw_t;
  typedef tw_t tw_tab_t [D];

  function automatic tw_tab_t make_tw(bit imag);
    tw_tab_t t;
    for (int j = 0; j < D; j++)
      t[j] = imag ? TW_W'(tw_msin_q(j << S, N, TW_F)) : TW_W'(tw_cos_q(j << S, N, TW_F));
    return t;
  endfunction

  localparam tw_tab_t TW_RE = make_tw(1'b0);
  localparam tw_tab_t TW_IM = make_tw(1'b1);

  logic signed [WO-1:0] dl_re [D];
  logic signed [WO-1:0] dl_im [D];
  logic                 second_half;
  logic [DA-1:0]        j;
  logic signed [WO-1:0] h_re, h_im, x_re, x_im;
  logic signed [PW-1:0] p_re, p_im;
  logic signed [WO-1:0] r_re, r_im;

  assign second_half = in_pos[LOG2N-1-S];
  assign j           = (D > 1) ? DA'(in_pos) : '0;
  assign h_re        = dl_re[j];
  assign h_im        = dl_im[j];
  assign x_re        = WO'(in_re);
  assign x_im        = WO'(in_im);

  // (h_re + j h_im) * (TW_RE + j TW_IM), rounded back to WO bits
  assign p_re = PW'(h_re) * PW'(TW_RE[j]) - PW'(h_im) * PW'(TW_IM[j]) + PW'(1 << (TW_F - 1));
  assign p_im = PW'(h_re) * PW'(TW_IM[j]) + PW'(h_im) * PW'(TW_RE[j]) + PW'(1 << (TW_F - 1));
  assign r_re = WO'(p_re >>> TW_F);
  assign r_im = WO'(p_im >>> TW_F);

  always_ff @(posedge clk) begin
    if (in_valid) begin
      if (second_half) begin
        dl_re[j] <= h_re - x_re;
        dl_im[j] <= h_im - x_im;
        out_re     <= h_re + x_re;
        out_im     <= h_im + x_im;
      end else begin
        dl_re[j] <= x_re;
        dl_im[j] <= x_im;
        out_re     <= r_re;
        out_im     <= r_im;
      end
    end
  end
endmodule
