// tdr_analog_model: behavioural model of the TDR meter's analog front end,
// for simulation only.
//
// Trigger path: the DDS D/A samples (one per DDS clock) are taken to be
// reconstructed by the band-pass filter, and the Schmitt trigger switches
// where that sine crosses mid-scale. The crossing time is found by linear
// interpolation between the two samples around it, and p rises one DDS clock
// after it (a fixed delay standing for the filter and comparator).
// JIT_PS > 0 adds random timing jitter to every trigger edge, with that rms
// value in ps: a sum of twelve uniform numbers, which is close to Gaussian and
// bounded to +/-6 rms. A fixed 6 rms is added to the delay so that it never
// goes negative. JIT_PS = 0 (the default) gives no jitter.
//
// Line: the excitation square wave reaches the line after T_DRV_NS through a
// driver with a linear rise of T_RISE_NS. The line answers an excitation edge
// with up to three steps: f1 * UG at once (divider of source resistance and
// line impedance), f2 * UG when the reflection from an impedance change
// t1_ns away (one way) returns, and the rest, (1 - f1 - f2) * UG, when the
// reflection from the open end t2_ns away returns. A matched source on a
// uniform open line is f1 = f2 = 0.5 with t1_ns = t2_ns. A falling edge
// gives the same response downwards. Each edge is taken to have settled
// before the next one.
//
// Sampling comparator: at each rising edge of p it latches q = (x > y), where
// y = fb_code * FB_FS / 2^FB_W is the feedback D/A output. `x_at_latch`
// holds the line voltage at the latest latch moment and `n_latch` counts
// latches. Times are in ns, voltages in V.
module tdr_analog_model #(
  parameter int  DDS_W       = 14,
  parameter int  FB_W        = 12,
  parameter real T_DDS_NS    = 5.0,
  parameter real FB_FS       = 4.0,
  parameter real UG          = 3.0,
  parameter real T_DRV_NS    = 40.0,
  parameter real T_RISE_NS   = 2.0,
  parameter real JIT_PS      = 0.0
) (
  input  logic             clk_dds,
  input  logic [DDS_W-1:0] dds_dac,
  input  logic             pulse,
  input  logic [FB_W-1:0]  fb_code,
  input  real              f1,
  input  real              f2,
  input  real              t1_ns,
  input  real              t2_ns,
  output logic             p,
  output logic             q,
  output real              x_at_latch,
  output int               n_latch
);
  localparam int MID = 1 << (DDS_W - 1);

  int  prev_code = MID;
  real t_rise = -1.0e9;
  real t_fall = -2.0e9;

  initial begin
    p = 1'b0;
    q = 1'b0;
    x_at_latch = 0.0;
    n_latch = 0;
  end

  function automatic real ramp(input real u);
    if (u <= 0.0)       return 0.0;
    if (u >= T_RISE_NS) return 1.0;
    return u / T_RISE_NS;
  endfunction

  // Voltage contributed by one rising edge of the excitation, tau after it.
  function automatic real step_resp(input real tau);
    return f1 * UG * ramp(tau - T_DRV_NS) + f2 * UG * ramp(tau - T_DRV_NS - 2.0 * t1_ns)
         + (1.0 - f1 - f2) * UG * ramp(tau - T_DRV_NS - 2.0 * t2_ns);
  endfunction

  function automatic real line_v(input real t);
    if (t_rise > t_fall) return step_resp(t - t_rise);
    return UG - step_resp(t - t_fall);
  endfunction

  // Trigger jitter in ns for one edge (zero when JIT_PS is 0).
  function automatic real jitter_ns();
    real u = 0.0;
    if (JIT_PS <= 0.0) return 0.0;
    for (int i = 0; i < 12; i++) u += real'($urandom % 1000000) / 1.0e6;
    return u * JIT_PS / 1000.0;           // (u - 6) rms, plus the 6 rms offset
  endfunction

  always @(posedge pulse) t_rise = $realtime / 1.0ns;
  always @(negedge pulse) t_fall = $realtime / 1.0ns;

  // Reconstructed sine crossing mid-scale -> trigger edge.
  always @(posedge clk_dds) begin
    int  cur;
    real frac;
    cur = int'(dds_dac);
    if (prev_code < MID && cur >= MID) begin
      frac = real'(MID - prev_code) / real'(cur - prev_code);
      p <= #((frac * T_DDS_NS + jitter_ns()) * 1.0ns) 1'b1;
    end else if (prev_code >= MID && cur < MID) begin
      frac = real'(prev_code - MID) / real'(prev_code - cur);
      p <= #((frac * T_DDS_NS + jitter_ns()) * 1.0ns) 1'b0;
    end
    prev_code = cur;
  end

  // Latched comparator.
  always @(posedge p) begin
    real x, y;
    x = line_v($realtime / 1.0ns);
    y = real'(fb_code) * FB_FS / real'(1 << FB_W);
    q = (x > y);
    x_at_latch = x;
    n_latch++;
  end
endmodule
