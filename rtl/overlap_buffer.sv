// overlap_buffer - 50 % frame overlap for the low-rate stages.
//
// Incoming sample pairs are written into a circular buffer of 2N entries
// (N = 2^LOG2N). Once N pairs have arrived, and after every further N/2
// pairs, the N most recent pairs are replayed oldest first as one burst of
// N consecutive out_valid clocks. Consecutive frames therefore share half
// of their samples, which doubles the number of spectra available for
// averaging at a given sampling rate. The burst starts the clock after the
// triggering in_valid and reads entries that later writes cannot reach
// within N clocks, so in_valid may arrive during a burst. The input rate
// must be at most one pair per 2 clocks (the stages using this block run at
// 125 kHz and less). Buffer size and burst read-out are this design's.
module overlap_buffer #(
  parameter int W     = 22,
  parameter int LOG2N = 10
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_a,
  input  logic signed [W-1:0] in_b,
  output logic                out_valid,
  output logic signed [W-1:0] out_a,
  output logic signed [W-1:0] out_b
);
  localparam int N = 1 << LOG2N;

  logic signed [W-1:0] mem_a [2*N];
  logic signed [W-1:0] mem_b [2*N];
  logic [LOG2N:0]   wr_ptr;       // next entry written
  logic [LOG2N:0]   rd_ptr;
  logic [LOG2N-1:0] new_cnt;      // pairs since the last frame
  logic             filled;       // first N pairs received
  logic             bursting;
  logic [LOG2N-1:0] burst_cnt;
  logic             trigger;

  assign trigger = in_valid &&
                   (filled ? (new_cnt == LOG2N'(N/2 - 1)) : (new_cnt == LOG2N'(N - 1)));

  always_ff @(posedge clk) begin
    if (in_valid) begin
      mem_a[wr_ptr] <= in_a;
      mem_b[wr_ptr] <= in_b;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      new_cnt   <= '0;
      filled    <= 1'b0;
      bursting  <= 1'b0;
      burst_cnt <= '0;
      out_valid <= 1'b0;
      out_a     <= '0;
      out_b     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        wr_ptr  <= wr_ptr + 1'b1;
        new_cnt <= trigger ? '0 : new_cnt + 1'b1;
        if (trigger) filled <= 1'b1;
      end
      if (trigger) begin
        // oldest of the N most recent pairs, including the one written now
        rd_ptr    <= wr_ptr + 1'b1 - (LOG2N+1)'(N);
        bursting  <= 1'b1;
        burst_cnt <= '0;
      end else if (bursting) begin
        out_a     <= mem_a[rd_ptr];
        out_b     <= mem_b[rd_ptr];
        out_valid <= 1'b1;
        rd_ptr    <= rd_ptr + 1'b1;
        burst_cnt <= burst_cnt + 1'b1;
        if (burst_cnt == LOG2N'(N - 1)) bursting <= 1'b0;
      end
    end
  end
endmodule
