// fft_r2sdf - streaming N-point complex FFT (N = 2^LOG2N), radix-2
// single-path delay-feedback, decimation in frequency.
//
// LOG2N butterfly stages (fft_sdf_stage) are chained; stage s has a delay
// memory of N/2^(s+1) words, N-1 words in all. One complex sample enters per
// in_valid and one result leaves per in_valid; all state advances only on
// in_valid. Every N consecutive in_valid after rst form one frame. The
// results of a frame appear, in bit-reversed order, while the next frame
// enters: result position p is registered LAT = N+LOG2N-2 samples after input
// position p; out_idx gives the natural bin index k of each result. out_valid is the
// in_valid of the same clock delayed by one, and stays low until the first
// complete frame comes out.
// Output: Z(k) = sum_n z(n) exp(-j 2 pi k n / N), not scaled. The input is
// extended by one guard bit and each stage adds one bit, so the output is
// W + LOG2N + 1 bits wide and cannot overflow. Twiddle products are rounded
// to nearest (Q1.16 twiddles), the only error source.
// This is a self-contained replacement for a vendor FFT core, with the same
// function: a 1024-point complex DFT at up to one sample per clock.
module fft_r2sdf #(
  parameter int W     = 16,
  parameter int LOG2N = 10
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         in_valid,
  input  logic signed [W-1:0]          in_re,
  input  logic signed [W-1:0]          in_im,
  output logic                         out_valid,
  output logic [LOG2N-1:0]             out_idx,
  output logic signed [W+LOG2N:0]      out_re,
  output logic signed [W+LOG2N:0]      out_im
);
  localparam int N   = 1 << LOG2N;
  localparam int LAT = N + LOG2N - 2;    // samples from input to output
  localparam int WO  = W + LOG2N + 1;

  // Data between stages: stage s input is W+1+s bits; packed in WO-bit slots
  logic signed [WO-1:0] st_re [LOG2N+1];
  logic signed [WO-1:0] st_im [LOG2N+1];
  logic [LOG2N-1:0]     pos [LOG2N+1];    // position at each stage input
  logic [LOG2N-1:0]     cnt;              // input position of this sample
  logic [$clog2(LAT+2)-1:0] seen;         // samples seen, saturating
  logic                 valid_d;

  assign st_re[0] = WO'(in_re);
  assign st_im[0] = WO'(in_im);

  // Stage s input position: every stage before it delays by its D plus one
  // output register.
  function automatic int stage_lat(int s);
    int l = 0;
    for (int t = 0; t < s; t++) l += (N >> (t + 1)) + 1;
    return l;
  endfunction

  for (genvar s = 0; s < LOG2N; s++) begin : g_stage
    localparam int WI = W + 1 + s;
    logic signed [WI:0] o_re, o_im;
    assign pos[s] = cnt - LOG2N'(stage_lat(s));
    fft_sdf_stage #(.W_IN(WI), .LOG2N(LOG2N), .S(s)) u_stage (
      .clk, .in_valid,
      .in_pos(pos[s]),
      .in_re(WI'(st_re[s])), .in_im(WI'(st_im[s])),
      .out_re(o_re), .out_im(o_im)
    );
    assign st_re[s+1] = WO'(o_re);
    assign st_im[s+1] = WO'(o_im);
  end
  assign pos[LOG2N] = cnt - LOG2N'(stage_lat(LOG2N) - 1);

  // pos[LOG2N] is the position of the result the last stage registers on
  // this in_valid: LAT samples behind the input.
  logic [LOG2N-1:0] opos;
  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      seen    <= '0;
      valid_d <= 1'b0;
      opos    <= '0;
    end else begin
      valid_d <= in_valid;
      if (in_valid) begin
        cnt  <= cnt + 1'b1;
        opos <= pos[LOG2N];
        if (seen <= ($clog2(LAT+2))'(LAT)) seen <= seen + 1'b1;
      end
    end
  end

  always_comb
    for (int b = 0; b < LOG2N; b++) out_idx[b] = opos[LOG2N-1-b];

  assign out_valid = valid_d && (seen > ($clog2(LAT+2))'(LAT));
  assign out_re    = st_re[LOG2N];
  assign out_im    = st_im[LOG2N];
endmodule
