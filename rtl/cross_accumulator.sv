// cross_accumulator - accumulator memory that averages cross-spectra.
//
// Holds one complex sum per bin k = 0..N/2. Averaging is started by a pulse
// on start: the block waits for the next frame to begin (k = 0), writes that
// frame's products into the bins, adds each following frame bin by bin, and
// after n_avg frames stops and raises done until the next start. count
// gives the number of frames summed so far; busy is high from start to
// done. n_avg = 0 is treated as 1. The sums are GROW bits wider than the
// products, so 2^GROW = 16384 frames (more than the 10,000 the analyzer is
// meant to hold) cannot overflow; n_avg should not exceed 2^GROW.
// Each product is added with a two-clock read-modify-write: the bin is read
// in the clock the product arrives and written one clock later. Bins of one
// frame arrive in increasing k, so a write never meets a read of the same
// bin. The host reads bin rd_addr through a separate port, one clock of
// latency; reading while averaging is allowed but returns partial sums.
// The control scheme is this design's choice.
module cross_accumulator #(
  parameter int W     = 57,
  parameter int LOG2N = 10,
  parameter int GROW  = 14,
  parameter int CNT_W = GROW + 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic [LOG2N-1:0]         in_k,
  input  logic                     in_last,
  input  logic signed [W-1:0]      in_re,
  input  logic signed [W-1:0]      in_im,
  input  logic                     start,
  input  logic [CNT_W-1:0]         n_avg,
  output logic                     busy,
  output logic                     done,
  output logic [CNT_W-1:0]         count,
  input  logic [LOG2N-1:0]         rd_addr,
  output logic signed [W+GROW-1:0] rd_re,
  output logic signed [W+GROW-1:0] rd_im
);
  localparam int NB = (1 << LOG2N) / 2 + 1;
  localparam int AW = W + GROW;
  typedef logic signed [AW-1:0] acc_t;

  typedef enum logic [1:0] { IDLE, WAIT_FRAME, RUN, FINISHED } state_t;
  state_t state;

  acc_t mem_re [NB];
  acc_t mem_im [NB];

  // stage 1: accepted product, old bin value read
  logic             s1_valid, s1_first;
  logic [LOG2N-1:0] s1_k;
  acc_t             s1_re, s1_im, old_re, old_im;
  logic             first_frame;
  logic             take;

  assign take = in_valid && (state == RUN || (state == WAIT_FRAME && in_k == '0));

  always_ff @(posedge clk) begin
    old_re <= mem_re[in_k];
    old_im <= mem_im[in_k];
    rd_re  <= mem_re[rd_addr];
    rd_im  <= mem_im[rd_addr];
    if (s1_valid) begin
      mem_re[s1_k] <= s1_first ? s1_re : old_re + s1_re;
      mem_im[s1_k] <= s1_first ? s1_im : old_im + s1_im;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= IDLE;
      count       <= '0;
      first_frame <= 1'b0;
      s1_valid    <= 1'b0;
      s1_first    <= 1'b0;
      s1_k        <= '0;
      s1_re       <= '0;
      s1_im       <= '0;
    end else begin
      s1_valid <= take;
      s1_k     <= in_k;
      s1_re    <= AW'(in_re);
      s1_im    <= AW'(in_im);
      s1_first <= (state == WAIT_FRAME) || first_frame;
      if (start) begin
        state <= WAIT_FRAME;
        count <= '0;
      end else begin
        case (state)
          WAIT_FRAME:
            if (take) begin
              state       <= RUN;
              first_frame <= 1'b1;
            end
          RUN:
            if (in_valid && in_last) begin
              first_frame <= 1'b0;
              count       <= count + 1'b1;
              if (count + 1'b1 >= n_avg) state <= FINISHED;
            end
          default: ;
        endcase
      end
    end
  end

  assign busy = (state == WAIT_FRAME) || (state == RUN);
  assign done = (state == FINISHED);

  // Bins of a frame arrive in increasing order, so a read never hits the bin
  // being written, and k never exceeds N/2.
  always_ff @(posedge clk) begin
    if (!rst && in_valid) begin
      a_no_rmw_hazard: assert (!s1_valid || in_k != s1_k)
        else $error("accumulator read of bin %0d while it is written", in_k);
      a_k_range: assert (int'(in_k) < NB)
        else $error("bin index %0d out of range", in_k);
    end
  end
endmodule
