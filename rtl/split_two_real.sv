// split_two_real - separates the FFT of z(n) = x(n) + j y(n) into the DFTs
// of the two real channels x (channel A) and y (channel B).
//
// Because X(N-k) = X*(k) for a real sequence, the even and odd parts of Z
// give, for k = 0..N/2,
//   2X(k) = [Zr(k) + Zr(N-k)] + j [Zi(k) - Zi(N-k)]
//   2Y(k) = [Zi(k) + Zi(N-k)] + j [Zr(N-k) - Zr(k)]
// (indices modulo N). This needs Z(k) and Z(N-k) at the same time, so a whole
// FFT frame is stored first: results are written by bin index (any order)
// into one of two N-word banks; after N writes the banks swap and the full
// bank is read out at k and N-k in parallel, one k per clock. Outputs are
// the doubled values 2X and 2Y (the factor 1/2 is not applied, so no bit is
// lost), W+1 bits each. Timing: the first output (k = 0) is registered two
// clocks after the clock that writes the last result of a frame; N/2+1 outputs follow on consecutive clocks,
// out_last marks k = N/2. A new frame may be written meanwhile; frames must
// be at least N/2+2 clocks apart, which any source at one sample per clock
// guarantees. The ping-pong banks are this design's choice.
module split_two_real #(
  parameter int W     = 27,
  parameter int LOG2N = 10
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic [LOG2N-1:0]    in_idx,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic [LOG2N-1:0]    out_k,
  output logic                out_last,
  output logic signed [W:0]   x_re,
  output logic signed [W:0]   x_im,
  output logic signed [W:0]   y_re,
  output logic signed [W:0]   y_im
);
  localparam int N = 1 << LOG2N;

  logic signed [W-1:0] mem_re [2][N];
  logic signed [W-1:0] mem_im [2][N];

  logic [LOG2N-1:0] wr_cnt;
  logic             wr_bank;
  logic             rd_bank;
  logic             reading;
  logic [LOG2N:0]   rd_k;        // 0 .. N/2
  logic [LOG2N-1:0] rd_nk;
  // read pipeline
  logic             r_valid, r_last;
  logic [LOG2N-1:0] r_k;
  logic signed [W-1:0] zk_re, zk_im, zn_re, zn_im;

  assign rd_nk = LOG2N'(N) - LOG2N'(rd_k);   // (N - k) mod N

  always_ff @(posedge clk) begin
    if (in_valid) begin
      mem_re[wr_bank][in_idx] <= in_re;
      mem_im[wr_bank][in_idx] <= in_im;
    end
  end

  always_ff @(posedge clk) begin
    zk_re <= mem_re[rd_bank][LOG2N'(rd_k)];
    zk_im <= mem_im[rd_bank][LOG2N'(rd_k)];
    zn_re <= mem_re[rd_bank][rd_nk];
    zn_im <= mem_im[rd_bank][rd_nk];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_cnt    <= '0;
      wr_bank   <= 1'b0;
      rd_bank   <= 1'b0;
      reading   <= 1'b0;
      rd_k      <= '0;
      r_valid   <= 1'b0;
      r_last    <= 1'b0;
      r_k       <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_k     <= '0;
      x_re      <= '0;
      x_im      <= '0;
      y_re      <= '0;
      y_im      <= '0;
    end else begin
      if (in_valid) begin
        wr_cnt <= wr_cnt + 1'b1;
        if (wr_cnt == LOG2N'(N - 1)) begin
          wr_bank <= ~wr_bank;
          rd_bank <= wr_bank;
          reading <= 1'b1;
          rd_k    <= '0;
        end
      end
      if (reading && !(in_valid && wr_cnt == LOG2N'(N - 1))) begin
        rd_k <= rd_k + 1'b1;
        if (rd_k == (LOG2N+1)'(N / 2)) reading <= 1'b0;
      end
      r_valid <= reading && !(in_valid && wr_cnt == LOG2N'(N - 1));
      r_last  <= rd_k == (LOG2N+1)'(N / 2);
      r_k     <= LOG2N'(rd_k);

      out_valid <= r_valid;
      out_last  <= r_valid && r_last;
      out_k     <= r_k;
      x_re      <= (W+1)'(zk_re) + (W+1)'(zn_re);
      x_im      <= (W+1)'(zk_im) - (W+1)'(zn_im);
      y_re      <= (W+1)'(zk_im) + (W+1)'(zn_im);
      y_im      <= (W+1)'(zn_re) - (W+1)'(zk_re);
    end
  end
endmodule
