// tb_overlap_buffer - feeds a numbered sample sequence at a slow, irregular
// rate and checks the frames that come out: the first after N samples, then
// one after every N/2 new samples; each frame is N consecutive out_valid
// clocks holding the N most recent samples in order, so consecutive frames
// share N/2 samples (50 % overlap).
module tb_overlap_buffer;
  localparam int W = 22, LOG2N = 5, N = 1 << LOG2N, NSAMP = 8 * N;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [W-1:0] in_a = 0, in_b = 0, out_a, out_b;
  logic out_valid;
  overlap_buffer #(.W(W), .LOG2N(LOG2N)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int sent = 0, frames = 0, in_frame = 0, frame_first [$];
  int got_a [$], got_b [$];
  bit prev_valid = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  always @(posedge clk) begin
    if (out_valid && !rst) begin
      if (!prev_valid) frame_first.push_back(sent);
      got_a.push_back(int'(out_a));
      got_b.push_back(int'(out_b));
    end
    prev_valid <= out_valid;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < NSAMP; i++) begin
      in_valid <= 1;
      in_a <= W'(i + 1);
      in_b <= W'(-(i + 1));
      @(posedge clk);
      sent++;
      in_valid <= 0;
      // 2 to 6 idle clocks: bursts of N overlap with new inputs
      repeat ($urandom_range(2, 6)) @(posedge clk);
    end
    repeat (2 * N) @(posedge clk);
    frames = got_a.size() / N;
    check(got_a.size() % N == 0, "frames of N samples");
    check(frames == 1 + (NSAMP - N) / (N / 2), $sformatf("%0d frames", frames));
    for (int f = 0; f < frames; f++) begin
      int last;
      last = N + f * N / 2;          // newest sample number in frame f
      for (int n = 0; n < N; n++)
        check(got_a[f * N + n] == last - N + 1 + n && got_b[f * N + n] == -(last - N + 1 + n),
              $sformatf("frame %0d sample %0d = %0d", f, n, got_a[f * N + n]));
      check(frame_first[f] == last, $sformatf("frame %0d started after %0d samples", f, frame_first[f]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSAMP * 8 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
