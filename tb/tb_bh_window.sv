// tb_bh_window - checks the windowing multiplier against the window
// formula evaluated by the testbench in floating point.
//
// Three frames are streamed (with gaps in in_valid in the third): channel A
// carries a constant full-scale value, so its output traces the window
// itself, and channel B carries random samples. Each output must be within
// one LSB of x * w(n). Also checks the window's shape: zero-ish at n = 0,
// peak 1 at n = N/2, symmetric, and the one-clock latency.
module tb_bh_window;
  localparam int W = 16, LOG2N = 6, N = 1 << LOG2N;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [W-1:0] in_a = 0, in_b = 0, out_a, out_b;
  logic out_valid;
  bh_window #(.W(W), .LOG2N(LOG2N)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int peak [N];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  function automatic real w(int n);
    real x;
    x = 2.0 * PI * n / N;
    return 0.35875 - 0.48829 * $cos(x) + 0.14128 * $cos(2.0 * x) - 0.01168 * $cos(3.0 * x);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 3; f++)
      for (int n = 0; n < N; n++) begin
        int xb;
        real ea, eb;
        if (f == 2) while ($urandom_range(0, 2) == 0) begin
          in_valid <= 0;
          @(posedge clk); #1;
          check(!out_valid, "out_valid without input");
        end
        xb = $signed($urandom_range(0, 65535)) - 32768;
        in_valid <= 1;
        in_a <= 16'sd32767;
        in_b <= W'(xb);
        @(posedge clk);
        in_valid <= 0;
        #1;
        ea = 32767.0 * w(n);
        eb = real'(xb) * w(n);
        check(out_valid, "out_valid one clock after in_valid");
        check(real'(out_a) - ea < 1.5 && ea - real'(out_a) < 1.5 &&
              real'(out_b) - eb < 1.5 && eb - real'(out_b) < 1.5,
              $sformatf("frame %0d n %0d got %0d/%0d want %.1f/%.1f", f, n, out_a, out_b, ea, eb));
        peak[n] = out_a;
      end
    check(peak[0] <= 2, $sformatf("w(0) %0d", peak[0]));
    check(peak[N/2] >= 32765, $sformatf("w(N/2) %0d", peak[N/2]));
    for (int n = 1; n < N / 2; n++) check(peak[n] - peak[N - n] <= 1 && peak[N - n] - peak[n] <= 1, "symmetry");
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
