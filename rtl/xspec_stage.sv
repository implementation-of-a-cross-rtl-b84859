// xspec_stage - one cross-spectrum processing stage: (optional 50 % overlap)
// -> Blackman-Harris window -> two-channel FFT -> split -> X conj(Y) ->
// accumulator memory.
//
// The two real channels are windowed and fed to one complex FFT as
// z = a + jb; the split block recovers the DFTs of a and b from it, and the
// cross-spectrum X(k) conj(Y(k)) of bins 0..N/2 is summed over n_avg frames.
// With OVERLAP = 1 (stages 3 to 5) an overlap buffer turns the slow input
// into bursts of N samples, one burst per N/2 new samples; without it
// (stages 0 to 2) the window sees the input stream directly and frames do
// not overlap.
// Widths: input W; FFT out W+LOG2N+1; split out W+LOG2N+2 (2X, 2Y); products
// 2W+2*LOG2N+5; sums 2W+2*LOG2N+5+GROW. A sum therefore equals
// 4 * sum over frames of X(k) conj(Y(k)) with X, Y the DFTs of the windowed
// (Q0.17) channels. Input samples may arrive every clock (OVERLAP = 0) or
// at most every second clock (OVERLAP = 1). The FFT returns a frame while
// the next one enters, so frame m reaches the accumulator during frame m+1;
// with OVERLAP = 1 the FFT input comes in bursts, and the last bins of a
// frame leave the FFT only when the next burst arrives (N/2 input samples
// later). The pipeline is not flushed between bursts.
// Host ports: see cross_accumulator.
module xspec_stage #(
  parameter int W       = 16,
  parameter int LOG2N   = 10,
  parameter bit OVERLAP = 1'b0,
  parameter int GROW    = 14,
  parameter int CNT_W   = GROW + 1,
  localparam int WF     = W + LOG2N + 1,
  localparam int WS     = WF + 1,
  localparam int WP     = 2 * WS + 1,
  localparam int WA     = WP + GROW
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_a,
  input  logic signed [W-1:0]  in_b,
  input  logic                 start,
  input  logic [CNT_W-1:0]     n_avg,
  output logic                 busy,
  output logic                 done,
  output logic [CNT_W-1:0]     count,
  input  logic [LOG2N-1:0]     rd_addr,
  output logic signed [WA-1:0] rd_re,
  output logic signed [WA-1:0] rd_im
);
  logic                v_ov, v_win, v_fft, v_spl, v_x;
  logic signed [W-1:0] a_ov, b_ov, a_win, b_win;
  logic [LOG2N-1:0]    fft_idx, spl_k, x_k;
  logic signed [WF-1:0] z_re, z_im;
  logic                spl_last, x_last;
  logic signed [WS-1:0] xr, xi, yr, yi;
  logic signed [WP-1:0] pr, pi;

  if (OVERLAP) begin : g_overlap
    overlap_buffer #(.W(W), .LOG2N(LOG2N)) u_overlap (
      .clk, .rst, .in_valid, .in_a, .in_b,
      .out_valid(v_ov), .out_a(a_ov), .out_b(b_ov)
    );
  end else begin : g_direct
    assign v_ov = in_valid;
    assign a_ov = in_a;
    assign b_ov = in_b;
  end

  bh_window #(.W(W), .LOG2N(LOG2N)) u_window (
    .clk, .rst, .in_valid(v_ov), .in_a(a_ov), .in_b(b_ov),
    .out_valid(v_win), .out_a(a_win), .out_b(b_win)
  );

  fft_r2sdf #(.W(W), .LOG2N(LOG2N)) u_fft (
    .clk, .rst, .in_valid(v_win), .in_re(a_win), .in_im(b_win),
    .out_valid(v_fft), .out_idx(fft_idx), .out_re(z_re), .out_im(z_im)
  );

  split_two_real #(.W(WF), .LOG2N(LOG2N)) u_split (
    .clk, .rst, .in_valid(v_fft), .in_idx(fft_idx), .in_re(z_re), .in_im(z_im),
    .out_valid(v_spl), .out_k(spl_k), .out_last(spl_last),
    .x_re(xr), .x_im(xi), .y_re(yr), .y_im(yi)
  );

  xcorr_mult #(.W(WS), .LOG2N(LOG2N)) u_xcorr (
    .clk, .rst, .in_valid(v_spl), .in_k(spl_k), .in_last(spl_last),
    .x_re(xr), .x_im(xi), .y_re(yr), .y_im(yi),
    .out_valid(v_x), .out_k(x_k), .out_last(x_last), .p_re(pr), .p_im(pi)
  );

  cross_accumulator #(.W(WP), .LOG2N(LOG2N), .GROW(GROW), .CNT_W(CNT_W)) u_acc (
    .clk, .rst, .in_valid(v_x), .in_k(x_k), .in_last(x_last), .in_re(pr), .in_im(pi),
    .start, .n_avg, .busy, .done, .count, .rd_addr, .rd_re, .rd_im
  );
endmodule
