// tb_split_two_real - writes frames of random Z(k) in bit-reversed order
// (as the FFT delivers them) and checks every output against
//   2X(k) = Zr(k)+Zr(N-k) + j(Zi(k)-Zi(N-k)),
//   2Y(k) = Zi(k)+Zi(N-k) + j(Zr(N-k)-Zr(k)),  k = 0..N/2.
// Frames 0 and 1 are written back to back at one word per clock, frame 2
// with gaps. Also checks N/2+1 outputs per frame in order, out_last on
// k = N/2 and the 2-clock latency from the last write to k = 0.
module tb_split_two_real;
  localparam int W = 20, LOG2N = 6, N = 1 << LOG2N, FR = 3;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [LOG2N-1:0] in_idx = 0, out_k;
  logic signed [W-1:0] in_re = 0, in_im = 0;
  logic out_valid, out_last;
  logic signed [W:0] x_re, x_im, y_re, y_im;
  split_two_real #(.W(W), .LOG2N(LOG2N)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int zr [FR][N], zi [FR][N];
  int outs = 0, cycle = 0, last_wr_cycle [FR], first_out_cycle [FR];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  function automatic int bitrev(int p);
    int r = 0;
    for (int b = 0; b < LOG2N; b++) if (p & (1 << b)) r |= 1 << (LOG2N - 1 - b);
    return r;
  endfunction

  always @(posedge clk) begin
    cycle++;
    if (out_valid && !rst) begin
      automatic int f = outs / (N / 2 + 1);
      automatic int k = outs % (N / 2 + 1);
      automatic int nk = (N - k) % N;
      if (k == 0) first_out_cycle[f] = cycle;
      check(int'(out_k) == k, $sformatf("order: got k %0d want %0d", out_k, k));
      check(out_last == (k == N / 2), "out_last");
      check(x_re == zr[f][k] + zr[f][nk] && x_im == zi[f][k] - zi[f][nk] &&
            y_re == zi[f][k] + zi[f][nk] && y_im == zr[f][nk] - zr[f][k],
            $sformatf("frame %0d k %0d", f, k));
      outs++;
    end
  end

  initial begin
    foreach (zr[f, n]) begin
      zr[f][n] = $signed($urandom_range(0, (1 << W) - 1)) - (1 << (W - 1));
      zi[f][n] = $signed($urandom_range(0, (1 << W) - 1)) - (1 << (W - 1));
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < FR; f++)
      for (int p = 0; p < N; p++) begin
        if (f == 2) while ($urandom_range(0, 2) == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        in_idx <= LOG2N'(bitrev(p));
        in_re <= W'(zr[f][bitrev(p)]);
        in_im <= W'(zi[f][bitrev(p)]);
        @(posedge clk);
        if (p == N - 1) last_wr_cycle[f] = cycle;
      end
    in_valid <= 0;
    repeat (N) @(posedge clk);
    check(outs == FR * (N / 2 + 1), $sformatf("%0d outputs", outs));
    for (int f = 0; f < FR; f++)
      // the write edge counts as cycle c; k = 0 is registered at edge c+2 and
      // sampled by the monitor at edge c+3, which it counts as c+4
      check(first_out_cycle[f] - last_wr_cycle[f] == 4,
            $sformatf("frame %0d latency %0d", f, first_out_cycle[f] - last_wr_cycle[f]));
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
