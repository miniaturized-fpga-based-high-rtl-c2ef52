// clock_divider: excitation pulse generator of the TDR meter.
//
// Divides the 50 MHz system clock by an integer ratio `div` into a square
// wave with (as near as possible) 50 % duty cycle, which drives the line
// driver. The main configuration divides by 50 to 1 MHz. A decimal divider
// counter from the system clock is what the original circuit uses; the
// duty-cycle rule for odd ratios and the run/phase-reset input are this
// design's own.
//
// Interface: while `run` is low the counter is held at 0 and `pulse` low.
// The first clock with `run` high starts a period: `pulse` goes high on the
// next clock edge. `pulse` stays high for
// div/2 cycles (rounded down) and low for the remaining cycles. Ratios below
// 2 act as 2. `div` should only change while `run` is low.
module clock_divider #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             run,
  input  logic [CNT_W-1:0] div,
  output logic             pulse
);
  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] div_eff;
  logic [CNT_W-1:0] high_len;

  always_comb begin
    div_eff  = (div < CNT_W'(2)) ? CNT_W'(2) : div;
    high_len = div_eff >> 1;
  end

  always_ff @(posedge clk) begin
    if (rst || !run) begin
      cnt   <= '0;
      pulse <= 1'b0;
    end else begin
      cnt   <= (cnt == div_eff - CNT_W'(1)) ? '0 : cnt + CNT_W'(1);
      pulse <= (cnt < high_len);
    end
  end
endmodule
