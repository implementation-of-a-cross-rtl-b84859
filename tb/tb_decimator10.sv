// tb_decimator10 - checks the CIC + FIR decimate-by-10 filter against a
// reference computed by the testbench from the filter equations: the CIC as
// a convolution with the 21-tap impulse response of five cascaded 5-sample
// moving sums, sampled every fifth input, then the 31-tap FIR sampled every
// second CIC output, scaled by 2^-27, rounded and saturated.
// Part 1 drives random samples every clock, part 2 random samples with
// random gaps, part 3 a full-scale DC level (the output must settle at
// 4x the input: gain 2^(W_OUT-W_IN)). Also checks one output per ten
// inputs and the output latency.
module tb_decimator10;
  import xspec_pkg::*;
  localparam int W_IN = 16, W_OUT = 18, NIN = 3000;

  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [W_IN-1:0] in_a = 0, in_b = 0;
  logic out_valid;
  logic signed [W_OUT-1:0] out_a, out_b;

  decimator10 #(.W_IN(W_IN), .W_OUT(W_OUT)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint xa [NIN], xb [NIN];
  longint ya [$], yb [$];
  longint hcic [21];
  longint hfir [31];
  int n_in = 0, n_out = 0, last_in_cycle = 0, cycle = 0, max_lat = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  function automatic longint ref_out(bit ch, int i);
    // FIR output i uses CIC outputs j = 2i+1-t, CIC output j = r[5j]
    longint acc, r;
    int j;
    acc = 0;
    for (int t = 0; t < 31; t++) begin
      j = 2 * i + 1 - t;
      r = 0;
      if (j < 0) continue;
      for (int m = 0; m < 21; m++)
        if (5 * j - m >= 0) r += hcic[m] * (ch ? xb[5 * j - m] : xa[5 * j - m]);
      acc += hfir[t] * r;
    end
    acc = (acc + (64'sd1 <<< 26)) >>> 27;
    if (acc > 131071) acc = 131071;
    if (acc < -131072) acc = -131072;
    return acc;
  endfunction

  always @(posedge clk) begin
    cycle++;
    if (out_valid && !rst) begin
      ya.push_back(longint'(out_a));
      yb.push_back(longint'(out_b));
      if (cycle - last_in_cycle > max_lat) max_lat = cycle - last_in_cycle;
    end
  end

  initial begin
    longint box [5] = '{1, 1, 1, 1, 1};
    longint tmp [21];
    // impulse response of (1 + z^-1 + ... + z^-4)^5
    foreach (hcic[m]) hcic[m] = (m == 0);
    repeat (5) begin
      foreach (tmp[m]) begin
        tmp[m] = 0;
        for (int q = 0; q < 5; q++) if (m - q >= 0) tmp[m] += box[q] * hcic[m - q];
      end
      hcic = tmp;
    end
    for (int t = 0; t < 16; t++) begin
      hfir[t] = FIR_COEF[t];
      hfir[30 - t] = FIR_COEF[t];
    end
    for (int n = 0; n < NIN; n++) begin
      if (n < 2000) begin
        xa[n] = $signed($urandom_range(0, 65535)) - 32768;
        xb[n] = $signed($urandom_range(0, 65535)) - 32768;
      end else begin
        xa[n] = 32767;
        xb[n] = -32768;
      end
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < NIN; n++) begin
      if (n >= 1000 && n < 2000) while ($urandom_range(0, 3) == 0) begin
        in_valid <= 0;
        @(posedge clk);
      end
      in_valid <= 1;
      in_a <= W_IN'(xa[n]);
      in_b <= W_IN'(xb[n]);
      @(posedge clk);
      if ((n + 1) % 10 == 0) last_in_cycle = cycle;
    end
    in_valid <= 0;
    repeat (30) @(posedge clk);
    check(ya.size() == NIN / 10, $sformatf("%0d outputs for %0d inputs", ya.size(), NIN));
    for (int i = 0; i < ya.size(); i++) begin
      longint ra, rb;
      ra = ref_out(1'b0, i);
      rb = ref_out(1'b1, i);
      check(ya[i] == ra && yb[i] == rb,
            $sformatf("output %0d got %0d/%0d want %0d/%0d", i, ya[i], yb[i], ra, rb));
    end
    // DC: 4x the input once the filters have settled
    check(ya[ya.size()-1] == 4 * 32767 && yb[yb.size()-1] == -4 * 32768,
          $sformatf("DC gain: %0d / %0d", ya[ya.size()-1], yb[yb.size()-1]));
    check(max_lat <= 12, $sformatf("latency %0d clocks", max_lat));
    $display("decimator latency after the 10th input: %0d clocks", max_lat);
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
