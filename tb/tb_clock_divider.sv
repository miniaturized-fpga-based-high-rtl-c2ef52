// tb_clock_divider: checks the excitation divider's period, duty cycle,
// restart phase and the minimum-ratio rule against cycle counts made here.
module tb_clock_divider;
  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        run = 1'b0;
  logic [15:0] div = 16'd50;
  logic        pulse;
  int          checks = 0, failures = 0;

  clock_divider #(.CNT_W(16)) dut (.clk, .rst, .run, .div, .pulse);

  always #10ns clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Measure `n` periods: high and low lengths in clock cycles.
  task automatic measure(input int ratio, input int n);
    int hi, lo, exp_hi;
    exp_hi = (ratio < 2 ? 2 : ratio) / 2;
    // first period starts on the first edge after run rises
    @(posedge clk); #1ns;
    check(pulse == 1'b1, $sformatf("div %0d: pulse high one clock after run", ratio));
    for (int k = 0; k < n; k++) begin
      hi = 0; lo = 0;
      while (pulse) begin @(posedge clk); #1ns; hi++; end
      while (!pulse) begin @(posedge clk); #1ns; lo++; end
      check(hi == exp_hi, $sformatf("div %0d: high %0d, expected %0d", ratio, hi, exp_hi));
      check(hi + lo == (ratio < 2 ? 2 : ratio),
            $sformatf("div %0d: period %0d", ratio, hi + lo));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1ns rst = 1'b0;
    begin
      int ratios[5] = '{50, 7, 20, 1, 3};
      foreach (ratios[i]) begin
        @(negedge clk) begin run = 1'b0; div = 16'(ratios[i]); end
        repeat (3) @(posedge clk);
        #1ns check(pulse == 1'b0, "pulse low while stopped");
        @(negedge clk) run = 1'b1;
        measure(ratios[i], 4);
      end
    end
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
