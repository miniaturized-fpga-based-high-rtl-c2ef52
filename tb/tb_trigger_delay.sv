// tb_trigger_delay: drives asynchronous trigger edges and checks that the read
// strobe comes exactly SETUP_CYCLES clock edges after the first edge that saw
// the trigger high, once per trigger, and that an edge during a wait is ignored.
module tb_trigger_delay;
  localparam int SETUP = 5;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic p   = 1'b0;
  logic read_stb;
  int   checks = 0, failures = 0;
  int   cyc = 0;
  int   first_hi_cyc = -1;
  int   strobes = 0;

  trigger_delay #(.SETUP_CYCLES(SETUP)) dut (.clk, .rst, .p_async(p), .read_stb);

  always #10ns clk = ~clk;

  // Reference: clock-edge index of the first edge that samples p high.
  // A trigger seen while one is still pending is ignored, as specified.
  logic p_prev_sampled = 1'b0;
  logic pending = 1'b0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (p && !p_prev_sampled && !rst && !pending) begin
      first_hi_cyc <= cyc;
      pending      <= 1'b1;
    end
    p_prev_sampled <= p;
    if (read_stb) begin
      pending <= 1'b0;
      strobes <= strobes + 1;
      checks++;
      // read_stb is set at edge first+SETUP, so it is seen at edge first+SETUP+1
      if (cyc != first_hi_cyc + SETUP + 1) begin
        failures++;
        $display("FAIL: strobe at edge %0d, trigger seen at %0d", cyc, first_hi_cyc);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1ns rst = 1'b0;
    for (int i = 0; i < 40; i++) begin
      #($urandom_range(400, 900) * 1ns + $urandom_range(0, 999) * 1ps);
      p = 1'b1;
      #($urandom_range(150, 400) * 1ns);
      p = 1'b0;
    end
    #1us;
    checks++;
    if (strobes != 40) begin failures++; $display("FAIL: %0d strobes for 40 triggers", strobes); end
    // Second trigger edge while the first still waits: one strobe only.
    strobes = 0;
    @(posedge clk); #2ns p = 1'b1; #25ns p = 1'b0; #25ns p = 1'b1; #100ns p = 1'b0;
    #1us;
    checks++;
    if (strobes != 1) begin failures++; $display("FAIL: %0d strobes for overlapping triggers", strobes); end
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
