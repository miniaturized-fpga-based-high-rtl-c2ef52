// tb_workload_linearity: the time-base linearity experiment. An open coaxial
// line is shortened from 200 cm to 100 cm in 10 cm steps (5 ns/m one way, so
// the round trip falls from 20 ns to 10 ns). Each length is measured at
// 1 MHz, 1 ps, 10 bit with the design at its default sizes. The round trip is
// the distance between the crossings of UG/4 and 3UG/4. Checks: each point
// within 100 ps of 10 ns/m x length, and a straight-line fit over all lengths
// with R^2 >= 0.9994 and a slope within 1 % of 10 ns/m. The per-point error is
// a sawtooth that repeats every 5 ns of delay (one DDS clock): the trigger
// edge is rebuilt from DDS samples whose phase is cut to the table address,
// so its timing error depends on where the crossing falls between samples.
// About 2 % of the position inside a 5 ns cell is seen here.
module tb_workload_linearity;

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

  tdr_analog_model #(.FB_W(12), .FB_FS(FS), .UG(UG), .T_DRV_NS(15.0), .T_RISE_NS(2.0)) u_ana (
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
    real thr[3];
    int  ek[3];
    realtime dur;
    real len[11], rt[11];
    real sx, sy, sxx, sxy, syy, n, slope, icpt, r2, ssr, sst;
    #1ns rst_n = 1'b0;
    #100ns rst_n = 1'b1;
    #200ns;
    thr = '{0.25 * UG, 0.75 * UG, 10.0 * UG};
    for (int i = 0; i < 11; i++) begin
      len[i] = 2.0 - 0.1 * i;
      t1_ns = 5.0 * len[i];
      t2_ns = t1_ns;
      measure(1.0e6, 26000, thr, ek, dur);
      rt[i] = real'(ek[1] - ek[0]) / 1000.0;       // ns
      $display("length %0.1f m: round trip %0.3f ns", len[i], rt[i]);
      check(rt[i] >= 10.0 * len[i] - 0.1 && rt[i] <= 10.0 * len[i] + 0.1,
            $sformatf("length %0.1f m: round trip %0.3f ns", len[i], rt[i]));
    end
    sx = 0; sy = 0; sxx = 0; sxy = 0; n = 11.0;
    for (int i = 0; i < 11; i++) begin
      sx += len[i]; sy += rt[i]; sxx += len[i] * len[i]; sxy += len[i] * rt[i];
    end
    slope = (n * sxy - sx * sy) / (n * sxx - sx * sx);
    icpt = (sy - slope * sx) / n;
    ssr = 0; sst = 0;
    for (int i = 0; i < 11; i++) begin
      ssr += (rt[i] - (slope * len[i] + icpt)) ** 2;
      sst += (rt[i] - sy / n) ** 2;
    end
    r2 = 1.0 - ssr / sst;
    $display("fit: %0.4f ns/m, offset %0.4f ns, R^2 = %0.6f", slope, icpt, r2);
    check(r2 >= 0.9994, $sformatf("R^2 %0.6f", r2));
    check(slope >= 9.9 && slope <= 10.1, $sformatf("slope %0.4f ns/m", slope));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
