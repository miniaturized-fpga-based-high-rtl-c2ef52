// tb_dm_integrator: drives read strobes with random comparator bits and checks
// the counter against a reference up/down model here: step size for several
// resolutions, saturation at both ends, start-code load, and the latency of
// PROC_CYCLES clocks from read strobe to the new code.
module tb_dm_integrator;
  localparam int DAC_W = 12;
  localparam int PROC  = 5;
  logic             clk = 1'b0;
  logic             rst = 1'b1;
  logic             load = 1'b0;
  logic [DAC_W-1:0] init = '0;
  logic [3:0]       res = 4'd10;
  logic             read_stb = 1'b0;
  logic             q = 1'b0;
  logic [DAC_W-1:0] code;
  logic             bit_valid, bit_q;
  int checks = 0, failures = 0;
  int sat_hi = 0, sat_lo = 0;

  dm_integrator #(.DAC_W(DAC_W), .PROC_CYCLES(PROC)) dut (
    .clk, .rst, .load, .init, .res, .read_stb, .q_async(q), .code, .bit_valid, .bit_q);

  always #10ns clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // One sample: q is set long before the strobe (comparator already latched).
  task automatic sample(input bit qv, inout int ref_code, input int r);
    int step, maxc, lat;
    int start_code;
    step = 1 << (DAC_W - r);
    maxc = (1 << DAC_W) - 1;
    @(negedge clk) q = qv;
    repeat (3) @(negedge clk);
    read_stb = 1'b1;
    @(negedge clk) read_stb = 1'b0;
    start_code = int'(code);
    lat = 1;
    while (!bit_valid && lat < 20) begin @(negedge clk); lat++; end
    // strobe set before edge R+1; bit_valid seen after edge R+PROC
    check(lat == PROC, $sformatf("latency %0d clocks", lat));
    check(bit_q == qv, "bit_q equals comparator bit");
    if (qv) begin
      if (ref_code + step <= maxc) ref_code += step; else sat_hi++;
    end else begin
      if (ref_code - step >= 0) ref_code -= step; else sat_lo++;
    end
    check(int'(code) == ref_code, $sformatf("code %0d, expected %0d (was %0d, q=%0d, res %0d)",
                                            code, ref_code, start_code, qv, r));
  endtask

  initial begin
    int ref_code;
    repeat (3) @(posedge clk);
    #1ns rst = 1'b0;
    ref_code = 0;
    // down at zero: saturates
    for (int i = 0; i < 3; i++) sample(1'b0, ref_code, 10);
    // random walk at 10 bit
    for (int i = 0; i < 200; i++) sample(1'($urandom_range(0, 1)), ref_code, 10);
    // run to the top at 8 bit
    res = 4'd8;
    for (int i = 0; i < 260; i++) sample(1'b1, ref_code, 8);
    // 12 bit resolution, random walk
    res = 4'd12;
    for (int i = 0; i < 100; i++) sample(1'($urandom_range(0, 1)), ref_code, 12);
    // load a start code
    @(negedge clk) begin init = 12'd2048; load = 1'b1; end
    @(negedge clk) load = 1'b0;
    ref_code = 2048;
    check(code == 12'd2048, "start code loaded");
    res = 4'd10;
    for (int i = 0; i < 50; i++) sample(1'($urandom_range(0, 1)), ref_code, 10);
    check(sat_hi > 0 && sat_lo > 0, "both saturation limits reached");
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
