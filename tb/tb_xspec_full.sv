// tb_xspec_full - runs the analyzer with all parameters at their defaults
// (1024-point frames, six stages, 16-bit ADC) through one complete
// averaging operation.
//
// The internal test signal (common plus independent noise in the two
// channels) is selected. Stage 0 and then stage 1 average four
// cross-spectra each, and stage 3, the first stage with 50 % overlapping
// frames, averages four overlapped ones; each must finish with the right frame count, and their averaged
// spectra must show the common part: a clearly positive real part summed
// over all 513 bins, larger than the summed magnitude of the imaginary
// part. Each must finish within the time four frames and the pipeline need
// at its sample rate (one sample per clock, one per ten clocks), and
// stage 3 faster than four frames without overlap could arrive.
module tb_xspec_full;
  localparam int N = 1024, NB = N / 2 + 1;

  logic clk = 0, rst = 1;
  logic signed [15:0] adc_a = 0, adc_b = 0;
  logic test_sel = 1;
  logic [5:0] acc_start = 0, acc_busy, acc_done;
  logic [14:0] acc_n_avg = 0;
  logic [5:0][14:0] acc_count;
  logic [2:0] rd_stage = 0;
  logic [9:0] rd_bin = 0;
  logic signed [90:0] rd_re, rd_im;
  logic fifo_rd = 0, fifo_empty, fifo_full, fifo_overflow;
  logic signed [27:0] fifo_a, fifo_b;
  logic [10:0] fifo_level;

  xspec_analyzer dut (.*);

  always #4 clk = ~clk;

  int checks = 0, failures = 0;

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

  task automatic check_stage(int s);
    real sum_re, sum_im;
    sum_re = 0; sum_im = 0;
    for (int k = 0; k < NB; k++) begin
      rd_stage = 3'(s);
      rd_bin = 10'(k);
      tick();
      tick();
      sum_re += real'(rd_re);
      sum_im += (rd_im < 0) ? -real'(rd_im) : real'(rd_im);
    end
    $display("stage %0d: sum Re %e, sum |Im| %e", s, sum_re, sum_im);
    check(sum_re > 0 && sum_re > sum_im, $sformatf("stage %0d spectrum", s));
  endtask

  int t3 = 0;
  always @(posedge clk) if (t3 > 0 && !acc_done[3]) t3++;

  initial begin
    int t;
    repeat (3) tick();
    rst = 0;
    repeat (10) tick();
    acc_n_avg = 4;
    acc_start = 6'b001001;
    tick();
    acc_start = 0;
    t3 = 1;
    for (t = 0; t < 20000 && !acc_done[0]; t++) tick();
    $display("stage 0 averaged 4 frames in %0d clocks", t);
    check(acc_done[0] && acc_count[0] == 4, "stage 0 done");
    // at most: wait for a frame start, four frames, pipeline tail
    check(t <= 6 * N + 100, $sformatf("stage 0 took %0d clocks", t));
    check_stage(0);
    acc_start = 6'b000010;
    tick();
    acc_start = 0;
    for (t = 0; t < 80000 && !acc_done[1]; t++) tick();
    $display("stage 1 averaged 4 frames in %0d clocks", t);
    check(acc_done[1] && acc_count[1] == 4, "stage 1 done");
    check(t <= 6 * 10 * N + 100, $sformatf("stage 1 took %0d clocks", t));
    check_stage(1);
    // stage 3 (1/1000 of the clock rate, 50 % overlap) was started together
    // with stage 0. Four overlapped frames need 1024 + 3*512 samples; the
    // last one leaves the FFT only while the next burst enters (its final
    // bins sit in the butterfly registers), which adds 2*512 samples: about
    // 3.6e6 clocks. Four frames without overlap would need 4096 + 1024
    // samples (5.1e6 clocks).
    while (!acc_done[3] && t3 < 4_100_000) tick();
    $display("stage 3 averaged 4 overlapped frames in %0d clocks", t3);
    check(acc_done[3] && acc_count[3] == 4, "stage 3 done");
    check(t3 <= 3_700_000, $sformatf("stage 3 took %0d clocks", t3));
    check_stage(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
