// tb_xspec_stage - end-to-end check of one processing stage, with and
// without the overlap block, against a floating-point model in the
// testbench: Blackman-Harris window, DFT of each channel, 4 X(k) conj(Y(k))
// summed over the averaged frames.
//
// Stage 0 (no overlap) receives random samples every clock; frames are
// consecutive blocks of N. The overlap stage receives samples every fourth
// clock; its frames start every N/2 samples. Both average N_AVG frames.
// The tolerance covers window rounding and twiddle rounding (a small
// fraction of |X||Y| plus an absolute term of the order of N LSBs per
// channel), far below the size of any functional error.
module tb_xspec_stage;
  localparam int W = 12, LOG2N = 5, N = 1 << LOG2N, NB = N / 2 + 1, N_AVG = 3;
  localparam int GROW = 14, CNT_W = GROW + 1;
  localparam int WA = 2 * (W + LOG2N + 2) + 1 + GROW;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst = 1;
  logic in_valid [2];
  logic signed [W-1:0] in_a [2], in_b [2];
  logic start [2];
  logic [CNT_W-1:0] n_avg;
  logic busy [2], done [2];
  logic [CNT_W-1:0] count [2];
  logic [LOG2N-1:0] rd_addr;
  logic signed [WA-1:0] rd_re [2], rd_im [2];

  xspec_stage #(.W(W), .LOG2N(LOG2N), .OVERLAP(1'b0)) dut0 (
    .clk, .rst, .in_valid(in_valid[0]), .in_a(in_a[0]), .in_b(in_b[0]),
    .start(start[0]), .n_avg, .busy(busy[0]), .done(done[0]), .count(count[0]),
    .rd_addr, .rd_re(rd_re[0]), .rd_im(rd_im[0]));
  xspec_stage #(.W(W), .LOG2N(LOG2N), .OVERLAP(1'b1)) dut1 (
    .clk, .rst, .in_valid(in_valid[1]), .in_a(in_a[1]), .in_b(in_b[1]),
    .start(start[1]), .n_avg, .busy(busy[1]), .done(done[1]), .count(count[1]),
    .rd_addr, .rd_re(rd_re[1]), .rd_im(rd_im[1]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xa [4*N], xb [4*N];

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  function automatic real win(int n);
    real x;
    x = 2.0 * PI * n / N;
    return 0.35875 - 0.48829 * $cos(x) + 0.14128 * $cos(2.0 * x) - 0.01168 * $cos(3.0 * x);
  endfunction

  // model: sum over frames f (starting at sample f*step) of 4 X conj(Y)
  task automatic model_and_compare(int d, int step);
    for (int k = 0; k < NB; k++) begin
      real sr, si, tol;
      sr = 0; si = 0; tol = 0;
      for (int f = 0; f < N_AVG; f++) begin
        real ar, ai, br, bi, mx, my;
        ar = 0; ai = 0; br = 0; bi = 0;
        for (int n = 0; n < N; n++) begin
          real c, s;
          c = $cos(2.0 * PI * k * n / N);
          s = -$sin(2.0 * PI * k * n / N);
          ar += xa[f * step + n] * win(n) * c;
          ai += xa[f * step + n] * win(n) * s;
          br += xb[f * step + n] * win(n) * c;
          bi += xb[f * step + n] * win(n) * s;
        end
        sr += 4.0 * (ar * br + ai * bi);
        si += 4.0 * (ai * br - ar * bi);
        mx = $sqrt(ar * ar + ai * ai);
        my = $sqrt(br * br + bi * bi);
        tol += 4.0 * (0.002 * mx * my + (mx + my) * (N / 2 + 8));
      end
      rd_addr = LOG2N'(k);
      tick();
      tick();
      check((real'(rd_re[d]) - sr) <= tol && (sr - real'(rd_re[d])) <= tol &&
            (real'(rd_im[d]) - si) <= tol && (si - real'(rd_im[d])) <= tol,
            $sformatf("stage%0d bin %0d got %0d,%0d want %.0f,%.0f tol %.0f", d, k, rd_re[d], rd_im[d], sr, si, tol));
    end
  endtask

  initial begin
    for (int d = 0; d < 2; d++) begin
      in_valid[d] = 0; in_a[d] = 0; in_b[d] = 0; start[d] = 0;
    end
    n_avg = N_AVG;
    rd_addr = 0;
    foreach (xa[n]) begin
      xa[n] = $signed($urandom_range(0, (1 << W) - 1)) - (1 << (W - 1));
      // channel B: half common with A, half independent
      xb[n] = (xa[n] + $signed($urandom_range(0, (1 << W) - 1)) - (1 << (W - 1))) / 2;
    end
    repeat (2) tick();
    rst = 0;
    start[0] = 1; start[1] = 1;
    tick();
    start[0] = 0; start[1] = 0;
    // stage without overlap: N_AVG + 1 frames plus the pipeline tail
    for (int n = 0; n < (N_AVG + 2) * N; n++) begin
      in_valid[0] = 1;
      in_a[0] = W'(xa[n % (4*N)]);
      in_b[0] = W'(xb[n % (4*N)]);
      tick();
    end
    in_valid[0] = 0;
    repeat (2 * N) tick();
    check(done[0] && count[0] == N_AVG, $sformatf("stage0 done %0d count %0d", done[0], count[0]));
    model_and_compare(0, N);
    // stage with overlap: frames every N/2 samples, input every 4th clock
    for (int n = 0; n < N + (N_AVG + 1) * N / 2; n++) begin
      in_valid[1] = 1;
      in_a[1] = W'(xa[n]);
      in_b[1] = W'(xb[n]);
      tick();
      in_valid[1] = 0;
      repeat (3) tick();
    end
    repeat (3 * N) tick();
    check(done[1] && count[1] == N_AVG, $sformatf("stage1 done %0d count %0d", done[1], count[1]));
    model_and_compare(1, N / 2);
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
