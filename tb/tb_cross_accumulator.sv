// tb_cross_accumulator - streams frames of random products (bins 0..N/2 in
// order, as the split/multiply chain delivers them) and checks the sums
// read back through the host port against sums kept by the testbench.
// Covers: start in the middle of a frame (that frame must be skipped),
// back-to-back frames, done after exactly n_avg frames with later frames
// ignored, a restart that overwrites the old sums, and n_avg = 0 acting
// as 1.
module tb_cross_accumulator;
  localparam int W = 20, LOG2N = 4, N = 1 << LOG2N, NB = N / 2 + 1, GROW = 14;
  localparam int CNT_W = GROW + 1;
  logic clk = 0, rst = 1, in_valid = 0, in_last = 0, start = 0;
  logic [LOG2N-1:0] in_k = 0, rd_addr = 0;
  logic signed [W-1:0] in_re = 0, in_im = 0;
  logic [CNT_W-1:0] n_avg = 0, count;
  logic busy, done;
  logic signed [W+GROW-1:0] rd_re, rd_im;
  cross_accumulator #(.W(W), .LOG2N(LOG2N), .GROW(GROW)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint sum_re [NB], sum_im [NB];

  // advance one clock; stimulus changes 1 time unit after the edge
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

  // one frame of products; add = 1 if the accumulator should take it
  task automatic frame(bit add, int first_k = 0);
    for (int k = first_k; k < NB; k++) begin
      longint pr, pi;
      pr = (k % 4 == 0) ? -(64'sd1 <<< (W - 1)) : longint'($signed($urandom_range(0, (1 << W) - 1))) - (64'sd1 <<< (W - 1));
      pi = longint'($signed($urandom_range(0, (1 << W) - 1))) - (64'sd1 <<< (W - 1));
      in_valid = 1; in_k = LOG2N'(k); in_last = (k == NB - 1);
      in_re = W'(pr); in_im = W'(pi);
      if (add) begin
        sum_re[k] += pr;
        sum_im[k] += pi;
      end
      tick();
    end
    in_valid = 0; in_last = 0;
    repeat ($urandom_range(0, 4)) tick();
  endtask

  task automatic readback(string what);
    for (int k = 0; k < NB; k++) begin
      rd_addr = LOG2N'(k);
      tick();
      tick();
      check(longint'(rd_re) == sum_re[k] && longint'(rd_im) == sum_im[k],
            $sformatf("%s bin %0d got %0d want %0d", what, k, rd_re, sum_re[k]));
    end
  endtask

  task automatic clear_ref();
    foreach (sum_re[k]) begin sum_re[k] = 0; sum_im[k] = 0; end
  endtask

  initial begin
    repeat (2) tick();
    rst = 0;
    tick();
    check(!busy && !done, "idle after reset");
    // start during a frame: the rest of that frame is ignored
    clear_ref();
    n_avg = 5;
    for (int k = 0; k < 3; k++) begin
      in_valid = 1; in_k = LOG2N'(k); in_re = 1; in_im = 1; tick();
    end
    start = 1; in_k = 3; tick(); start = 0;
    in_valid = 0;
    frame(0, 4);
    check(busy && count == 0, "waiting for a frame start");
    for (int f = 0; f < 5; f++) frame(1);
    repeat (3) tick();
    check(done && !busy && count == 5, $sformatf("done after 5 frames (count %0d)", count));
    frame(0);
    frame(0);
    check(done && count == 5, "frames after done are ignored");
    readback("avg5");
    // restart with n_avg = 2: old sums are overwritten
    clear_ref();
    n_avg = 2;
    start = 1; tick(); start = 0;
    frame(1); frame(1);
    repeat (3) tick();
    check(done && count == 2, "done after 2 frames");
    readback("avg2");
    // n_avg = 0 behaves as 1
    clear_ref();
    n_avg = 0;
    start = 1; tick(); start = 0;
    frame(1);
    frame(0);
    repeat (3) tick();
    check(done && count == 1, "n_avg 0");
    readback("avg1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
