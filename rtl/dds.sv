// dds: 48-bit direct digital synthesizer that generates the sampling trigger.
//
// A 48-bit phase accumulator advances by the tuning word `ftw` on every
// cycle of the 200 MHz DDS clock, so the output frequency is
// f = ftw * 200 MHz / 2^48 with a step of 0.71 uHz. The top 12 phase bits
// address a quarter-wave sine table (2^10 entries, mirrored and negated for
// the other three quadrants), and the result is sent, offset-binary, to an
// external D/A converter. Outside the FPGA that signal is band-pass filtered
// and squared by a Schmitt trigger into the trigger p(t). The accumulator
// width and clock follow the original circuit; the table size, the 14-bit
// output and the pipeline are this design's own choices.
//
// Timing: `run` comes from the 50 MHz domain and passes a two-flop
// synchroniser. While it is low the phase is held at 0 and the output sits at
// mid-scale; once it is seen high the accumulator starts from 0, so the
// trigger phase is known relative to the excitation divider that is started
// by the same signal. The D/A code follows the phase with three clocks of
// latency (accumulator, table address, table output). `ftw` must be static
// while `run` is high.
module dds #(
  parameter int unsigned ACC_W  = 48,
  parameter int unsigned LUT_AW = 10,
  parameter int unsigned OUT_W  = 14
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             run,
  input  logic [ACC_W-1:0] ftw,
  output logic [OUT_W-1:0] dac
);
  localparam int unsigned LUT_N = 1 << LUT_AW;
  localparam int unsigned AMP_W = OUT_W - 1;          // magnitude bits
  typedef logic [AMP_W-1:0] lut_t [LUT_N];

  // Quarter-wave table: entry i = round((2^AMP_W - 1) * sin((i + 0.5) * pi / (2 * LUT_N))).
  // sin is evaluated with a Taylor series up to x^13 in Q40 fixed point.
  function automatic lut_t make_lut();
    lut_t t;
    longint signed pi_q40;
    longint signed x, x2, term, acc;
    pi_q40 = 64'sd3454217652358;                       // round(pi * 2^40)
    for (int i = 0; i < LUT_N; i++) begin
      x    = ((pi_q40 * (2 * i + 1)) / (4 * LUT_N));   // angle in Q40, below pi/2
      x2   = (x >>> 20) * (x >>> 20);                  // Q40
      term = x;
      acc  = x;
      for (int k = 1; k <= 6; k++) begin
        term = -(((term >>> 20) * (x2 >>> 20)) / ((2 * k) * (2 * k + 1)));
        acc  = acc + term;
      end
      t[i] = AMP_W'(((acc >>> 10) * ((longint'(1) << AMP_W) - 1) + (longint'(1) << 29)) >>> 30);
    end
    return t;
  endfunction

  localparam lut_t LUT = make_lut();

  logic [1:0]       run_sync;
  logic [ACC_W-1:0] phase;
  logic [LUT_AW-1:0] lut_addr;
  logic             neg;     // second half-wave
  logic             neg_d;
  logic [AMP_W-1:0] mag;

  always_ff @(posedge clk) begin
    if (rst) run_sync <= '0;
    else     run_sync <= {run_sync[0], run};
  end

  // Phase accumulator.
  always_ff @(posedge clk) begin
    if (rst || !run_sync[1]) phase <= '0;
    else                     phase <= phase + ftw;
  end

  // Table address: quadrants 1 and 3 read the table backwards.
  always_ff @(posedge clk) begin
    if (rst || !run_sync[1]) begin
      lut_addr <= '0;
      neg      <= 1'b0;
    end else begin
      neg      <= phase[ACC_W-1];
      lut_addr <= phase[ACC_W-2] ? ~phase[ACC_W-3 -: LUT_AW] : phase[ACC_W-3 -: LUT_AW];
    end
  end

  always_ff @(posedge clk) begin
    mag    <= LUT[lut_addr];
    neg_d  <= neg;
  end

  // Offset binary: mid-scale is 2^(OUT_W-1); the second half-wave is negative.
  always_ff @(posedge clk) begin
    if (rst || !run_sync[1]) dac <= OUT_W'(1) << (OUT_W - 1);
    else if (neg_d)      dac <= (OUT_W'(1) << (OUT_W - 1)) - OUT_W'(mag) - OUT_W'(1);
    else                     dac <= (OUT_W'(1) << (OUT_W - 1)) + OUT_W'(mag);
  end
endmodule
