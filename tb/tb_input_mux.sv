// tb_input_mux - drives random ADC and test samples with a randomly
// switching select and checks that the output is the selected pair one
// clock later, and that valid is low in reset and high after it.
module tb_input_mux;
  localparam int W = 16;
  logic clk = 0, rst = 1, sel = 0;
  logic signed [W-1:0] adc_a = 0, adc_b = 0, tst_a = 0, tst_b = 0, a, b;
  logic valid;
  input_mux #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, switches = 0;
  logic signed [W-1:0] ea, eb;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    @(posedge clk); #1;
    check(!valid, "valid during reset");
    rst <= 0;
    for (int i = 0; i < 500; i++) begin
      logic nsel;
      nsel = $urandom_range(0, 3) == 0 ? ~sel : sel;
      if (nsel != sel) switches++;
      sel <= nsel;
      adc_a <= W'($urandom); adc_b <= W'($urandom);
      tst_a <= W'($urandom); tst_b <= W'($urandom);
      @(posedge clk); #1;
      ea = sel ? tst_a : adc_a;
      eb = sel ? tst_b : adc_b;
      @(posedge clk); #1;
      check(valid && a == ea && b == eb, $sformatf("cycle %0d sel %0d", i, sel));
    end
    check(switches > 50, "select switched too rarely");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
