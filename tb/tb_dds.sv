// tb_dds: checks the DDS output sample by sample against a phase accumulator
// and a real-valued sine computed here (within 1 LSB of the table's rounding),
// the three-clock latency after run is seen, mid-scale output while stopped,
// and the output frequency by counting upward mid-scale crossings.
module tb_dds;
  localparam int ACC_W = 48;
  localparam int OUT_W = 14;
  localparam int LUT_AW = 10;
  localparam real PI = 3.14159265358979323846;
  logic             clk = 1'b0;
  logic             rst = 1'b1;
  logic             run = 1'b0;
  logic [ACC_W-1:0] ftw;
  logic [OUT_W-1:0] dac;
  int checks = 0, failures = 0;

  dds #(.ACC_W(ACC_W), .LUT_AW(LUT_AW), .OUT_W(OUT_W)) dut (.clk, .rst, .run, .ftw, .dac);

  always #2.5ns clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Expected code for a phase: the table cell is addressed by the top
  // LUT_AW+2 bits and holds sin at the cidx centre.
  function automatic int expect_code(logic [ACC_W-1:0] ph);
    longint cidx;
    real a, s;
    cidx = longint'(ph >> (ACC_W - LUT_AW - 2));
    a = 2.0 * PI * (real'(cidx) + 0.5) / real'(1 << (LUT_AW + 2));
    s = $sin(a);
    // magnitude is rounded, negative half is mid - mag - 1
    if (s >= 0) return (1 << (OUT_W - 1)) + int'($floor(s * ((1 << (OUT_W - 1)) - 1) + 0.5));
    else        return (1 << (OUT_W - 1)) - int'($floor(-s * ((1 << (OUT_W - 1)) - 1) + 0.5)) - 1;
  endfunction

  task automatic run_freq(input real f_hz, input int n);
    logic [ACC_W-1:0] ph;
    int exp_c;
    int crossings;
    int prev;
    real f_meas;
    ftw = ACC_W'(longint'(f_hz * (2.0 ** ACC_W) / 200.0e6 + 0.5));
    @(negedge clk) run = 1'b0;
    repeat (6) @(negedge clk);
    check(int'(dac) == (1 << (OUT_W - 1)), "mid-scale while stopped");
    run = 1'b1;
    // run seen after 2 edges; phase 0 reaches the output 3 edges later
    repeat (5) @(negedge clk);
    ph = '0;
    crossings = 0;
    prev = int'(dac);
    for (int k = 0; k < n; k++) begin
      exp_c = expect_code(ph);
      if (k < 64 || k % 97 == 0)
        check(int'(dac) >= exp_c - 1 && int'(dac) <= exp_c + 1,
              $sformatf("f=%0.0f k=%0d dac %0d expected %0d", f_hz, k, dac, exp_c));
      if (prev < (1 << (OUT_W - 1)) && int'(dac) >= (1 << (OUT_W - 1))) crossings++;
      prev = int'(dac);
      ph += ftw;
      @(negedge clk);
    end
    f_meas = real'(crossings) / (real'(n) * 5.0e-9);
    check(f_meas > f_hz * 0.95 - 2.0e5 && f_meas < f_hz * 1.05 + 2.0e5,
          $sformatf("frequency %0.0f Hz measured for %0.0f Hz", f_meas, f_hz));
  endtask

  initial begin
    ftw = '0;
    repeat (3) @(posedge clk);
    #1ns rst = 1'b0;
    run_freq(999999.0, 4000);
    run_freq(2.0e6, 4000);
    run_freq(13.7e6, 2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
