// tb_xspec_analyzer - end-to-end test of the analyzer at reduced size
// (16-point frames, three stages, overlap from stage 2, 16-entry FIFO).
//
// Phase 1, test signal: the internal generator drives both channels with
// common plus independent noise. All stages average eight frames; the
// averaged cross-spectrum of every stage must have a clearly positive real
// part summed over the bins (the common part) and a smaller imaginary part.
// Phase 2, ADC with a tone: both channels carry the same cosine at bin 3 of
// stage 0; stage 0 must show its peak at bin 3 with |P| there close to
// 4 |X(3)|^2 computed by the testbench.
// Phase 3, ADC with DC levels +C / -C: the FIFO (not read for a while) must
// fill and set its overflow flag; after it is drained, new samples must
// equal C * 4^3 and -C * 4^3, the gain of three decimators.
// Counted mechanisms: source switches, averaging completions per stage,
// overlapped frames, FIFO writes, FIFO overflow, FIFO reads.
module tb_xspec_analyzer;
  localparam int ADC_W = 16, LOG2N = 4, N = 1 << LOG2N, NB = N / 2 + 1, NSTAGES = 3;
  localparam int FIFO_DEPTH = 16, GROW = 14, CNT_W = GROW + 1;
  localparam int W_LAST = ADC_W + 2 * NSTAGES;
  localparam int ACC_MAX_W = 2 * (ADC_W + 2 * (NSTAGES - 1) + LOG2N + 2) + 1 + GROW;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst = 1;
  logic signed [ADC_W-1:0] adc_a, adc_b;
  logic test_sel;
  logic [NSTAGES-1:0] acc_start, acc_busy, acc_done;
  logic [CNT_W-1:0] acc_n_avg;
  logic [NSTAGES-1:0][CNT_W-1:0] acc_count;
  logic [1:0] rd_stage;
  logic [LOG2N-1:0] rd_bin;
  logic signed [ACC_MAX_W-1:0] rd_re, rd_im;
  logic fifo_rd, fifo_empty, fifo_full, fifo_overflow;
  logic signed [W_LAST-1:0] fifo_a, fifo_b;
  logic [$clog2(FIFO_DEPTH):0] fifo_level;

  xspec_analyzer #(.ADC_W(ADC_W), .LOG2N(LOG2N), .NSTAGES(NSTAGES), .OVERLAP_FROM(2),
                   .FIFO_DEPTH(FIFO_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int n_switch = 0, n_done [NSTAGES], n_overlap_frames = 0, n_fifo_wr = 0, n_overflow = 0, n_fifo_rd = 0;
  int tone_n = 0;
  bit tone_on = 0;

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

  // event counters watching the design
  logic prev_ov_valid = 0;
  logic [NSTAGES-1:0] prev_done = 0;
  logic prev_overflow = 0;
  always @(posedge clk) begin
    cycle++;
    if (!rst) begin
      for (int s = 0; s < NSTAGES; s++)
        if (acc_done[s] && !prev_done[s]) n_done[s]++;
      if (dut.g_chain[2].u_stage.v_ov && !prev_ov_valid) n_overlap_frames++;
      if (dut.s_valid[NSTAGES]) n_fifo_wr++;
      if (fifo_overflow && !prev_overflow) n_overflow++;
    end
    prev_done     <= acc_done;
    prev_ov_valid <= dut.g_chain[2].u_stage.v_ov;
    prev_overflow <= fifo_overflow;
  end

  // tone generator for phase 2: cosine at bin 3 of a 16-point frame
  always @(posedge clk) begin
    if (tone_on) begin
      adc_a <= ADC_W'($rtoi(20000.0 * $cos(2.0 * PI * 3.0 * tone_n / N)));
      adc_b <= ADC_W'($rtoi(20000.0 * $cos(2.0 * PI * 3.0 * tone_n / N)));
      tone_n <= tone_n + 1;
    end
  end

  task automatic run_average(int n);
    acc_n_avg = CNT_W'(n);
    acc_start = '1;
    tick();
    acc_start = '0;
    for (int t = 0; t < 200000 && acc_done != '1; t++) tick();
    check(acc_done == '1, $sformatf("averaging finished: done %b", acc_done));
    for (int s = 0; s < NSTAGES; s++)
      check(acc_count[s] == CNT_W'(n), $sformatf("stage %0d count %0d", s, acc_count[s]));
  endtask

  task automatic read_bin(int s, int k, output real re, output real im);
    rd_stage = 2'(s);
    rd_bin = LOG2N'(k);
    tick();
    tick();
    re = real'(rd_re);
    im = real'(rd_im);
  endtask

  initial begin
    real re, im, sum_re, sum_im, best, mag, expect_mag;
    int best_k;
    adc_a = 0; adc_b = 0; test_sel = 1; acc_start = 0; acc_n_avg = 0;
    rd_stage = 0; rd_bin = 0; fifo_rd = 0;
    repeat (3) tick();
    rst = 0;
    // phase 1: test signal
    repeat (200) tick();
    run_average(8);
    for (int s = 0; s < NSTAGES; s++) begin
      sum_re = 0; sum_im = 0;
      for (int k = 0; k < NB; k++) begin
        read_bin(s, k, re, im);
        sum_re += re;
        sum_im += (im < 0) ? -im : im;
      end
      check(sum_re > 0 && sum_re > sum_im,
            $sformatf("stage %0d: sum Re %e, sum |Im| %e", s, sum_re, sum_im));
    end
    // phase 2: switch to the ADC with a tone
    test_sel = 0; n_switch++;
    tone_on = 1;
    repeat (300) tick();
    acc_n_avg = 1;
    acc_start = 3'b001;
    tick();
    acc_start = '0;
    for (int t = 0; t < 2000 && !acc_done[0]; t++) tick();
    check(acc_done[0], "stage 0 tone average");
    best = -1; best_k = -1;
    for (int k = 0; k < NB; k++) begin
      read_bin(0, k, re, im);
      mag = $sqrt(re * re + im * im);
      if (mag > best) begin best = mag; best_k = k; end
    end
    // windowed cosine of amplitude A at bin 3: |X(3)| = A * N/2 * a0
    expect_mag = 4.0 * (20000.0 * N / 2 * 0.35875) ** 2;
    check(best_k == 3, $sformatf("tone peak in bin %0d", best_k));
    check(best > 0.9 * expect_mag && best < 1.1 * expect_mag,
          $sformatf("tone power %e want %e", best, expect_mag));
    tone_on = 0;
    // phase 3: DC levels, FIFO left unread until it overflows
    adc_a = 1000; adc_b = -1000;
    for (int t = 0; t < 60000 && !fifo_overflow; t++) tick();
    check(fifo_full && fifo_overflow, "FIFO filled and overflowed");
    // drain the FIFO (its entries still carry the start-up transient)
    while (!fifo_empty) begin
      fifo_rd = 1;
      tick();
      fifo_rd = 0;
      n_fifo_rd++;
    end
    check(fifo_overflow, "overflow flag is sticky");
    // keep reading while the decimators settle (about 20,000 clocks)
    for (int t = 0; t < 30000; t++) begin
      fifo_rd = !fifo_empty;
      if (fifo_rd) n_fifo_rd++;
      tick();
    end
    fifo_rd = 0;
    // wait for fresh, settled samples: they show the gain of three decimators
    for (int i = 0; i < 3; i++) begin
      for (int t = 0; t < 5000 && fifo_empty; t++) tick();
      check(!fifo_empty && fifo_a == 64000 && fifo_b == -64000,
            $sformatf("FIFO DC %0d / %0d", fifo_a, fifo_b));
      fifo_rd = 1;
      tick();
      fifo_rd = 0;
      n_fifo_rd++;
    end
    // the switch back to the test signal
    test_sel = 1; n_switch++;
    repeat (20) tick();
    $display("mechanisms: switches %0d, done %0d/%0d/%0d, overlapped frames %0d, FIFO writes %0d, overflows %0d, FIFO reads %0d",
             n_switch, n_done[0], n_done[1], n_done[2], n_overlap_frames, n_fifo_wr, n_overflow, n_fifo_rd);
    check(n_switch > 0, "source switch never happened");
    for (int s = 0; s < NSTAGES; s++) check(n_done[s] > 0, $sformatf("stage %0d never finished", s));
    check(n_overlap_frames > 0, "no overlapped frame");
    check(n_fifo_wr > 0, "no FIFO write");
    check(n_overflow > 0, "no FIFO overflow");
    check(n_fifo_rd > 0, "no FIFO read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
