// tb_test_signal_gen - checks the test signal generator against its own
// model of three maximal-length LFSRs (x^32 + x^22 + x^2 + x + 1, 32 steps
// per sample), and
// checks the property that matters for the analyzer: over many samples
// the two channels are strongly correlated (common part) but not equal
// (independent parts).
module tb_test_signal_gen;
  localparam int W = 16, NS = 4000;
  logic clk = 0, rst = 1;
  logic signed [W-1:0] a, b;
  test_signal_gen #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] sc, sa, sb;
  real sab = 0, saa = 0, sbb = 0;
  int n_equal = 0;
  real s1 = 0;
  logic signed [W-1:0] prev_a = 0;

  function automatic logic [31:0] lfsr_next(logic [31:0] s);
    logic [31:0] n;
    n = {1'b0, s[31:1]};
    if (s[0]) begin
      n[31] = ~n[31]; n[21] = ~n[21]; n[1] = ~n[1]; n[0] = ~n[0];
    end
    return n;
  endfunction

  function automatic logic signed [W-1:0] top(logic [31:0] s);
    return W'($signed(s[31:31-(W-3)]));
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    sc = 32'h1234_5678; sa = 32'h9E37_79B9; sb = 32'h7F4A_7C15;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);   // first output register load
    for (int i = 0; i < NS; i++) begin
      logic signed [W-1:0] ea, eb;
      #1;
      ea = top(sc) + top(sa);
      eb = top(sc) + top(sb);
      check(a == ea && b == eb, $sformatf("sample %0d got %0d/%0d want %0d/%0d", i, a, b, ea, eb));
      sab += real'(a) * real'(b);
      saa += real'(a) * real'(a);
      sbb += real'(b) * real'(b);
      if (a == b) n_equal++;
      if (i > 0) s1 += real'(a) * real'(prev_a);
      prev_a = a;
      repeat (32) begin
        sc = lfsr_next(sc); sa = lfsr_next(sa); sb = lfsr_next(sb);
      end
      @(posedge clk);
    end
    // correlation coefficient of c+na and c+nb is 1/2 for equal powers
    check(sab / $sqrt(saa * sbb) > 0.4 && sab / $sqrt(saa * sbb) < 0.6,
          $sformatf("correlation %f", sab / $sqrt(saa * sbb)));
    check(n_equal < NS / 100, "channels nearly identical");
    // white: neighbouring samples uncorrelated
    check(s1 / saa < 0.1 && s1 / saa > -0.1, $sformatf("lag-1 correlation %f", s1 / saa));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
