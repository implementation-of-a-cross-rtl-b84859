// tb_fft_r2sdf - checks the streaming FFT against a direct DFT computed in
// floating point by the testbench.
//
// Five frames of random complex samples are streamed, the first two
// continuously (one per clock) and the rest with random gaps in in_valid.
// Every result of frames 0..3 that leaves the pipeline is compared with the DFT of its frame; the
// allowed error is a few LSBs per stage from twiddle rounding. The test also
// checks that each frame's results carry every bin index exactly once, and
// that the first result is seen N+LOG2N-1 samples after the first input (the
// counter used here lags by one).
module tb_fft_r2sdf;
  localparam int W = 12, LOG2N = 6, N = 1 << LOG2N, FRAMES = 5;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 2.0 * LOG2N;

  logic clk = 0, rst = 1;
  logic in_valid = 0;
  logic signed [W-1:0] in_re = 0, in_im = 0;
  logic out_valid;
  logic [LOG2N-1:0] out_idx;
  logic signed [W+LOG2N:0] out_re, out_im;

  fft_r2sdf #(.W(W), .LOG2N(LOG2N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xr [FRAMES][N], xi [FRAMES][N];
  int in_count = 0, out_count = 0, first_out_at = -1;
  bit seen_bin [FRAMES][N];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  function automatic void dft(int f, int k, output real re, output real im);
    re = 0; im = 0;
    for (int n = 0; n < N; n++) begin
      real a = -2.0 * PI * real'(k * n % N) / real'(N);
      re += xr[f][n] * $cos(a) - xi[f][n] * $sin(a);
      im += xr[f][n] * $sin(a) + xi[f][n] * $cos(a);
    end
  endfunction

  // output monitor
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      automatic int f = out_count / N;
      automatic real er = 0.0, ei = 0.0;
      if (first_out_at < 0) first_out_at = in_count;
      if (f < FRAMES - 1) begin
        dft(f, int'(out_idx), er, ei);
        check(!seen_bin[f][out_idx], $sformatf("bin %0d twice in frame %0d", out_idx, f));
        seen_bin[f][out_idx] = 1;
        check((real'(out_re) - er) < TOL && (er - real'(out_re)) < TOL &&
              (real'(out_im) - ei) < TOL && (ei - real'(out_im)) < TOL,
              $sformatf("frame %0d bin %0d got %0d,%0d want %.1f,%.1f", f, out_idx, out_re, out_im, er, ei));
      end
      out_count++;
    end
  end

  initial begin
    foreach (seen_bin[f, k]) seen_bin[f][k] = 0;
    for (int f = 0; f < FRAMES; f++)
      for (int n = 0; n < N; n++) begin
        xr[f][n] = $signed($urandom_range(0, (1 << W) - 1)) - (1 << (W-1));
        xi[f][n] = $signed($urandom_range(0, (1 << W) - 1)) - (1 << (W-1));
      end
    // a pure tone in frame 1 real part: DFT is concentrated in bins 3, N-3
    for (int n = 0; n < N; n++) begin
      xr[1][n] = $rtoi(1500.0 * $cos(2.0 * PI * 3 * n / N));
      xi[1][n] = 0;
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < FRAMES; f++)
      for (int n = 0; n < N; n++) begin
        if (f >= 2) while ($urandom_range(0, 2) == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        in_re <= W'(xr[f][n]);
        in_im <= W'(xi[f][n]);
        @(posedge clk);
        in_count++;
      end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    for (int f = 0; f < FRAMES - 2; f++)
      for (int k = 0; k < N; k++) check(seen_bin[f][k], $sformatf("frame %0d bin %0d missing", f, k));
    // the first result is seen one clock after the in_valid that produces it
    check(first_out_at == N + LOG2N, $sformatf("latency: first output after %0d inputs", first_out_at));
    check(out_count == FRAMES * N - (LOG2N - 2) - N,
          $sformatf("output count %0d", out_count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
