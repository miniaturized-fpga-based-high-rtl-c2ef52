// trigger_delay: waits out the sampling comparator's latch setup time.
//
// The trigger p(t) from the external Schmitt trigger latches the sampling
// comparator. Because the integrator tracks the input closely, the
// comparator's differential input is only millivolts and it needs a long
// time to settle, so the FPGA must not read the comparator until a fixed
// setup time has passed. This block brings p(t) into the 50 MHz domain with a
// two-flop synchroniser, detects its rising edge and raises `read_stb` for one
// clock SETUP_CYCLES clock edges after the first edge that sampled p(t) high.
// The 100 ns setup allowance (5 cycles at 50 MHz) is the original circuit's;
// the synchroniser and the rule that a trigger edge arriving during a wait is
// ignored are this design's own.
//
// Timing: if clock edge E0 is the first to see p(t) high, `read_stb` is high
// during the cycle that follows edge E0 + SETUP_CYCLES. SETUP_CYCLES >= 3.
module trigger_delay #(
  parameter int unsigned SETUP_CYCLES = 5
) (
  input  logic clk,
  input  logic rst,
  input  logic p_async,
  output logic read_stb
);
  localparam int unsigned CNT_W = $clog2(SETUP_CYCLES + 1);

  logic [2:0]       p_sync;   // [0] first stage
  logic             rise;
  logic             busy;
  logic [CNT_W-1:0] cnt;

  initial assert (SETUP_CYCLES >= 3) else $error("trigger_delay: SETUP_CYCLES must be at least 3");

  always_ff @(posedge clk) begin
    if (rst) p_sync <= '0;
    else     p_sync <= {p_sync[1:0], p_async};
  end

  assign rise = p_sync[1] & ~p_sync[2];

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      cnt      <= '0;
      read_stb <= 1'b0;
    end else begin
      read_stb <= 1'b0;
      if (busy) begin
        if (cnt == '0) begin
          busy     <= 1'b0;
          read_stb <= 1'b1;
        end else begin
          cnt <= cnt - CNT_W'(1);
        end
      end else if (rise) begin
        busy <= 1'b1;
        cnt  <= CNT_W'(SETUP_CYCLES - 3);
      end
    end
  end
endmodule
