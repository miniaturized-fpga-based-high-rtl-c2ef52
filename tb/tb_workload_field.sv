// tb_workload_field: the groundwater field measurement. A 4 m line in sand
// is driven through a 150 ohm output resistor at 1 MHz, 1 ps, 10 bit (the
// design's defaults and reset values). The line model has three steps: the
// divider of 150 ohm and about 180 ohm in dry sand (f1 = 180/330), the
// partial reflection from the dry/wet boundary 1.6 m down (about 6.7 ns/m in
// dry sand), and the open end after 2.4 m of wet sand (about 15 ns/m). These
// soil values are assumptions for the test. The edges are found at the middle
// of each step; checks: dry-to-boundary time 2 x 10.72 ns and end time
// 2 x 46.72 ns, each within 50 ps, i.e. the boundary depth within 4 mm.
module tb_workload_field;

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
    real tb_ns, te_ns, depth;
    #1ns rst_n = 1'b0;
    #100ns rst_n = 1'b1;
    #200ns;
    f1 = 180.0 / 330.0;
    f2 = 0.15;
    t1_ns = 1.6 * 6.7;
    t2_ns = t1_ns + 2.4 * 15.0;
    thr = '{0.5 * f1 * UG, (f1 + 0.5 * f2) * UG, (f1 + f2 + 0.5 * (1.0 - f1 - f2)) * UG};
    measure(1.0e6, 100000, thr, ek, dur);
    tb_ns = real'(ek[1] - ek[0]) / 1000.0;
    te_ns = real'(ek[2] - ek[0]) / 1000.0;
    depth = tb_ns / 2.0 / 6.7;
    $display("edges at %0d, %0d, %0d: boundary %0.3f ns (%0.3f m), end %0.3f ns",
             ek[0], ek[1], ek[2], tb_ns, depth, te_ns);
    check(ek[0] > 0 && ek[1] > ek[0] && ek[2] > ek[1], "three edges found");
    check(tb_ns >= 2.0 * t1_ns - 0.05 && tb_ns <= 2.0 * t1_ns + 0.05, $sformatf("boundary time %0.3f ns", tb_ns));
    check(te_ns >= 2.0 * t2_ns - 0.05 && te_ns <= 2.0 * t2_ns + 0.05, $sformatf("end time %0.3f ns", te_ns));
    check(depth >= 1.596 && depth <= 1.604, $sformatf("boundary depth %0.3f m", depth));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
