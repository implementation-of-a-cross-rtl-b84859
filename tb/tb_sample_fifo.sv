// tb_sample_fifo - random writes and reads against a queue model: data
// order, empty/full/level, first-word fall-through, dropping writes when
// full and the sticky overflow flag.
module tb_sample_fifo;
  localparam int W = 24, DEPTH = 16;
  logic clk = 0, rst = 1, wr = 0, rd = 0;
  logic [W-1:0] din = 0, dout;
  logic empty, full, overflow;
  logic [$clog2(DEPTH):0] level;
  sample_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, fulls = 0, drops = 0;
  logic [W-1:0] q [$];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 2000; i++) begin
      bit w, r;
      // phases: fill (more writes), drain (more reads)
      w = (i % 400 < 200) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      r = (i % 400 < 200) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      #1;
      check(empty == (q.size() == 0) && full == (q.size() == DEPTH) && int'(level) == q.size(),
            $sformatf("flags at %0d: level %0d model %0d", i, level, q.size()));
      if (q.size() > 0) check(dout == q[0], "head");
      check(overflow == (drops > 0), "overflow flag");
      if (full) fulls++;
      wr <= w; rd <= r; din <= W'($urandom);
      @(posedge clk);
      // model: read first (of the old state), write if not full
      begin
        automatic bit was_full = (q.size() == DEPTH);
        if (r && q.size() > 0) void'(q.pop_front());
        if (w && !was_full) q.push_back(din);
        if (w && was_full) drops++;
      end
    end
    check(fulls > 0 && drops > 0, "full and overflow exercised");
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
