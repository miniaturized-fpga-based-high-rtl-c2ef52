// tb_workload_jitter: the jitter experiment. The trigger of the line model
// gets random timing jitter of 10 ps rms (a value chosen for the test). A
// matched open line with a 5 ns round trip is recorded again and again at
// 1 ps and 10 bit, with the design at its default sizes: 6 times at 100 kHz
// and 20 times at 2 MHz, the two excitation frequencies of the experiment.
// Every record is rebuilt from the SRAM model and both rising edges are found
// at their middle. Checks, per frequency: every round trip within 5 ns
// +/- 60 ps, the mean round trip within 20 ps, the spread (rms) of the first
// edge over the records under 50 ps (the resolution the instrument is meant
// for), and at least two different edge positions, so the jitter does reach
// the record. The repeats here stand for the far larger number of records a
// histogram would use. With 10 ps rms on the trigger, the edge moves by only
// about 1 ps rms from record to record: the counter needs many samples to
// climb a step, so it averages the jitter of the single latches.
module tb_workload_jitter;

  import tdr_pkg::*;
  localparam real UG = 3.0;
  localparam real FS = 4.0;

  logic clk = 1'b0, clk_dds = 1'b0, rst_n = 1'b1;
  logic sclk = 1'b0, cs_n = 1'b1, mosi = 1'b0, miso;
  logic busy, done, pulse_out, p, q;
  logic [13:0] dds_dac;
  logic [11:0] fb_dac;
  logic [16:0] sram_addr;
  logic [15:0] sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_ce_n, sram_oe_n, sram_we_n;
  int   sram_viol, sram_writes;
  real  x_at_latch;
  int   n_latch;
  real  f1 = 0.5, f2 = 0.5, t1_ns = 5.0, t2_ns = 5.0;
  int checks = 0, failures = 0;

  tdr_fpga_top dut (
    .clk, .clk_dds, .rst_n,
    .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso), .busy, .done,
    .pulse_out, .dds_dac, .p_in(p), .q_in(q), .fb_dac,
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i, .sram_ce_n, .sram_oe_n, .sram_we_n);

  tdr_analog_model #(.FB_W(12), .FB_FS(FS), .UG(UG), .T_DRV_NS(15.0), .T_RISE_NS(2.0), .JIT_PS(10.0)) u_ana (
    .clk_dds, .dds_dac, .pulse(pulse_out), .fb_code(fb_dac),
    .f1, .f2, .t1_ns, .t2_ns, .p, .q, .x_at_latch, .n_latch);

  sram_model #(.AW(17), .DW(16)) u_sram (
    .addr(sram_addr), .dq_in(sram_dq_o), .dq_out(sram_dq_i),
    .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n), .violations(sram_viol), .writes(sram_writes));

  always #10ns  clk = ~clk;
  always #2.5ns clk_dds = ~clk_dds;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic spi_write(input logic [6:0] addr, input logic [31:0] din);
    logic [39:0] frame;
    frame = {1'b1, addr, din};
    cs_n = 1'b0;
    #200ns;
    for (int i = 39; i >= 0; i--) begin
      mosi = frame[i];
      #125ns sclk = 1'b1;
      #125ns sclk = 1'b0;
    end
    #200ns cs_n = 1'b1;
    #300ns;
  endtask

  // Feedback code at every comparator latch.
  int ys[$];
  always @(n_latch) ys.push_back(int'(fb_dac));

  // Trigger-to-feedback-update time, worst case seen.
  realtime t_p, worst_lat = 0;
  always @(posedge p) t_p = $realtime;
  always @(posedge dut.u_int.bit_valid) if (busy && $realtime - t_p > worst_lat) worst_lat = $realtime - t_p;

  // Rebuilt feedback code of every sample of the latest record.
  int rec[$];

  // Mean rebuilt voltage over samples lo .. hi-1 of the latest record.
  function automatic real mean_v(input int lo, input int hi);
    real sum = 0.0;
    for (int k = lo; k < hi; k++) sum += real'(rec[k]) * FS / 4096.0;
    return sum / real'(hi - lo);
  endfunction

  // One measurement at 1 ps and 10 bit: excitation f_pulse, nrec samples.
  // The record is taken straight from the SRAM model, rebuilt into feedback
  // codes (checked against the codes seen at every latch) and the first
  // sample where the rebuilt voltage reaches each threshold is returned.
  task automatic measure(input real f_pulse, input int nrec, input real thr[3], output int edge_k[3],
                         output realtime dur);
    real f_trig;
    longint ftw;
    int l0, c, s, bad;
    realtime t0;
    f_trig = 1.0 / (1.0 / f_pulse + 1.0e-12);
    ftw = longint'(f_trig * (2.0 ** 48) / 200.0e6);
    spi_write(REG_DIV, 32'(int'(50.0e6 / f_pulse)));
    spi_write(REG_FTW_LO, ftw[31:0]);
    spi_write(REG_FTW_HI, 32'(ftw[47:32]));
    spi_write(REG_NSAMPLES, nrec);
    l0 = ys.size();
    spi_write(REG_CTRL, 32'd1);
    t0 = $realtime;
    wait (done);
    dur = $realtime - t0;
    s = 4;                               // 10-bit steps of a 12-bit code
    c = 0;
    bad = 0;
    edge_k = '{-1, -1, -1};
    rec.delete();
    for (int k = 0; k < nrec; k++) begin
      rec.push_back(c);
      if (c != ys[l0 + k]) bad++;
      for (int e = 0; e < 3; e++)
        if (edge_k[e] < 0 && real'(c) * FS / 4096.0 >= thr[e]) edge_k[e] = k;
      if (u_sram.mem[k / 16][k % 16]) begin
        if (c + s <= 4095) c += s;
      end else if (c >= s) c -= s;
    end
    check(bad == 0, $sformatf("%0d samples where the stored bits do not rebuild the feedback codes", bad));
  endtask

  initial begin
    real fr[2] = '{100.0e3, 2.0e6};
    int  nrep[2] = '{6, 20};
    real thr[3];
    int  ek[3];
    realtime dur;
    real e0, rt, s0, s00, srt, sd, lo, hi;
    int  first, distinct;
    #1ns rst_n = 1'b0;
    #100ns rst_n = 1'b1;
    #200ns;
    t1_ns = 2.5;
    t2_ns = 2.5;
    thr = '{0.25 * UG, 0.75 * UG, 10.0 * UG};
    foreach (fr[i]) begin
      s0 = 0; s00 = 0; srt = 0; lo = 1.0e9; hi = -1.0e9; first = -1; distinct = 0;
      for (int r = 0; r < nrep[i]; r++) begin
        measure(fr[i], 9000, thr, ek, dur);
        e0 = real'(ek[0]);
        rt = real'(ek[1] - ek[0]) / 1000.0;
        s0 += e0; s00 += e0 * e0; srt += rt;
        if (first < 0) first = ek[0];
        else if (ek[0] != first) distinct = 1;
        check(ek[0] > 0 && ek[1] > ek[0] && rt >= 4.94 && rt <= 5.06,
              $sformatf("%0.0f Hz record %0d: edges at %0d and %0d", fr[i], r, ek[0], ek[1]));
      end
      s0 /= nrep[i];
      sd = $sqrt(s00 / nrep[i] - s0 * s0);
      srt /= nrep[i];
      $display("%0.0f Hz, %0d records: first edge mean %0.1f, rms %0.1f ps; round trip mean %0.4f ns",
               fr[i], nrep[i], s0, sd, srt);
      check(srt >= 4.98 && srt <= 5.02, $sformatf("%0.0f Hz: mean round trip %0.4f ns", fr[i], srt));
      check(sd < 50.0, $sformatf("%0.0f Hz: edge spread %0.1f ps rms", fr[i], sd));
      check(distinct == 1, $sformatf("%0.0f Hz: jitter shows in the record", fr[i]));
    end
    check(sram_viol == 0, "SRAM timing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
