// dm_integrator: the digital integrator of the delta modulator.
//
// The delta modulator compares the line voltage x(t) with the feedback
// voltage y(t) in a latched comparator; its output q is 1 when x > y. On every
// trigger this block reads q and moves an up/down counter one step up (q = 1)
// or down (q = 0). The counter drives the feedback D/A converter that makes
// y(t), so the loop keeps y(t) tracking x(t), and the stream of q bits is the
// one-bit pulse-code record of the waveform. The counter-as-integrator and
// the up/down rule are the original circuit's. Its own choices: a DAC_W-bit
// counter (12 by default) whose step is 2^(DAC_W - res), so that the
// amplitude resolution `res` (10 bit in the main configuration) can be set at
// run time; saturation at both ends instead of wrap-around; start value
// loaded with `load`.
//
// Timing: `q_async` passes a two-flop synchroniser. If `read_stb` was set at
// clock edge R, q is captured at edge R+3 and `code`, `bit_valid` and `bit_q`
// change at edge R + PROC_CYCLES (5 cycles, 100 ns at 50 MHz, the FPGA
// processing time of the loop). PROC_CYCLES >= 4. Strobes must be at least
// PROC_CYCLES cycles apart (the loop time is 25 cycles at 2 MHz).
module dm_integrator #(
  parameter int unsigned DAC_W       = 12,
  parameter int unsigned PROC_CYCLES = 5
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [DAC_W-1:0] init,
  input  logic [3:0]       res,
  input  logic             read_stb,
  input  logic             q_async,
  output logic [DAC_W-1:0] code,
  output logic             bit_valid,
  output logic             bit_q
);
  localparam logic [DAC_W-1:0] MAX_CODE = '1;

  logic [1:0]             q_sync;
  logic [PROC_CYCLES-2:0] stb_pipe;
  logic                   q_cap;
  logic [3:0]             res_eff;
  logic [DAC_W-1:0]       step;

  initial assert (PROC_CYCLES >= 4) else $error("dm_integrator: PROC_CYCLES must be at least 4");

  always_comb begin
    if (res == 4'd0)                  res_eff = 4'd1;
    else if (32'(res) > DAC_W)        res_eff = 4'(DAC_W);
    else                              res_eff = res;
    step = DAC_W'(1) << (DAC_W - 32'(res_eff));
  end

  always_ff @(posedge clk) begin
    if (rst) q_sync <= '0;
    else     q_sync <= {q_sync[0], q_async};
  end

  always_ff @(posedge clk) begin
    if (rst || load) begin
      stb_pipe  <= '0;
      q_cap     <= 1'b0;
      code      <= rst ? '0 : init;
      bit_valid <= 1'b0;
      bit_q     <= 1'b0;
    end else begin
      stb_pipe  <= {stb_pipe[PROC_CYCLES-3:0], read_stb};
      if (stb_pipe[1]) q_cap <= q_sync[1];
      bit_valid <= stb_pipe[PROC_CYCLES-2];
      if (stb_pipe[PROC_CYCLES-2]) begin
        bit_q <= q_cap;
        if (q_cap) begin
          if (code <= MAX_CODE - step) code <= code + step;
        end else begin
          if (code >= step) code <= code - step;
        end
      end
    end
  end
endmodule
