// tb_xcorr_mult - random complex operands, including the extreme values,
// checked against X * conj(Y) computed by the testbench in 64-bit integers;
// also checks the one-clock latency and that k and last travel along.
module tb_xcorr_mult;
  localparam int W = 28, LOG2N = 10;
  logic clk = 0, rst = 1, in_valid = 0, in_last = 0;
  logic [LOG2N-1:0] in_k = 0, out_k;
  logic signed [W-1:0] x_re = 0, x_im = 0, y_re = 0, y_im = 0;
  logic out_valid, out_last;
  logic signed [2*W:0] p_re, p_im;
  xcorr_mult #(.W(W), .LOG2N(LOG2N)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  function automatic longint rnd(int i);
    if (i % 7 == 0) return -(64'sd1 <<< (W - 1));            // most negative
    if (i % 11 == 0) return (64'sd1 <<< (W - 1)) - 1;        // most positive
    return longint'($signed($urandom_range(0, (1 << W) - 1))) - (64'sd1 <<< (W - 1));
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 1000; i++) begin
      longint xr, xi, yr, yi;
      xr = rnd(i); xi = rnd(i + 3); yr = rnd(i + 5); yi = rnd(i + 1);
      in_valid <= 1; in_k <= LOG2N'(i); in_last <= (i % 5 == 4);
      x_re <= W'(xr); x_im <= W'(xi); y_re <= W'(yr); y_im <= W'(yi);
      @(posedge clk);
      in_valid <= 0;
      #1;
      check(out_valid && out_k == LOG2N'(i) && out_last == (i % 5 == 4), "valid/k/last");
      check(longint'(p_re) == xr * yr + xi * yi && longint'(p_im) == xi * yr - xr * yi,
            $sformatf("product %0d", i));
      @(posedge clk); #1;
      check(!out_valid, "single-cycle valid");
    end
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
