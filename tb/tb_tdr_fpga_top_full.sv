// tb_tdr_fpga_top_full: one complete measurement with the design at its
// default sizes (128K x 16 SRAM, 12-bit feedback converter) and the control
// registers at their reset values: 1 MHz excitation, trigger 1 Hz lower
// (1 ps equivalent-time step), 10-bit amplitude resolution. Only the number
// of samples is written (45008, a 45 ns window) before the start command.
// The line model is a matched source on an open line with a 10 ns round trip
// and a 2 ns rise. The record is read back over SPI and rebuilt; checks:
// the rebuilt codes equal the feedback codes at every latch, the loop tracks
// flat parts within two steps, and the two rising edges found at UG/4 and
// 3UG/4 are 10000 +/- 50 samples (10 ns +/- 50 ps) apart. The trigger model
// takes its edge times from the 14-bit DDS samples, which leaves it a jitter
// of about +/-10 ps, so that tolerance is wider than one step.
module tb_tdr_fpga_top_full;
  import tdr_pkg::*;
  localparam int  SRAM_AW = 17;
  localparam int  DAC_W   = 12;
  localparam real T_RES_PS = 1.0;
  localparam int  NREC    = 45008;
  localparam real UG      = 3.0;
  localparam real FS      = 4.0;

  logic clk = 1'b0, clk_dds = 1'b0, rst_n = 1'b1;
  logic sclk = 1'b0, cs_n = 1'b1, mosi = 1'b0, miso;
  logic busy, done, pulse_out, p, q;
  logic [13:0] dds_dac;
  logic [DAC_W-1:0] fb_dac;
  logic [SRAM_AW-1:0] sram_addr;
  logic [15:0] sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_ce_n, sram_oe_n, sram_we_n;
  int   sram_viol, sram_writes;
  real  x_at_latch;
  int   n_latch;
  int checks = 0, failures = 0;

  tdr_fpga_top dut (
    .clk, .clk_dds, .rst_n,
    .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso), .busy, .done,
    .pulse_out, .dds_dac, .p_in(p), .q_in(q), .fb_dac,
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i, .sram_ce_n, .sram_oe_n, .sram_we_n);

  tdr_analog_model #(.FB_W(DAC_W), .FB_FS(FS), .UG(UG), .T_DRV_NS(40.0), .T_RISE_NS(2.0)) u_ana (
    .clk_dds, .dds_dac, .pulse(pulse_out), .fb_code(fb_dac),
    .f1(0.5), .f2(0.5), .t1_ns(5.0), .t2_ns(5.0), .p, .q, .x_at_latch, .n_latch);

  sram_model #(.AW(SRAM_AW), .DW(16)) u_sram (
    .addr(sram_addr), .dq_in(sram_dq_o), .dq_out(sram_dq_i),
    .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n), .violations(sram_viol), .writes(sram_writes));

  always #10ns  clk = ~clk;
  always #2.5ns clk_dds = ~clk_dds;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---- microcontroller SPI (mode 0, 4 MHz) ----
  task automatic spi_xfer(input bit wr, input logic [6:0] addr, input logic [31:0] din,
                          output logic [31:0] dout);
    logic [39:0] frame;
    frame = {wr, addr, din};
    dout = '0;
    cs_n = 1'b0;
    #200ns;
    for (int i = 39; i >= 0; i--) begin
      mosi = frame[i];
      #125ns sclk = 1'b1;
      if (i < 32) dout[i] = miso;
      #125ns sclk = 1'b0;
    end
    #200ns cs_n = 1'b1;
    #300ns;
  endtask
  task automatic wr_reg(input logic [6:0] a, input logic [31:0] d);
    logic [31:0] dummy;
    spi_xfer(1'b1, a, d, dummy);
  endtask
  task automatic rd_reg(input logic [6:0] a, output logic [31:0] d);
    spi_xfer(1'b0, a, 32'd0, d);
  endtask

  // ---- what happens at every comparator latch ----
  real xs[$];
  int  ys[$];
  always @(n_latch) begin
    xs.push_back(x_at_latch);
    ys.push_back(int'(fb_dac));
  end

  // ---- loop timing: trigger edge to the next feedback update ----
  realtime t_p;
  bit      seen_p = 1'b0;
  int      n_lat_checked = 0;
  always @(posedge p) begin t_p = $realtime; if (busy) seen_p = 1'b1; end
  always @(posedge dut.u_int.bit_valid) begin
    realtime lat;
    lat = $realtime - t_p;
    if (seen_p && n_lat_checked < 200) begin
      n_lat_checked++;
      check(lat >= 180ns && lat <= 230ns, $sformatf("trigger to feedback update %0t at %0t", lat, $realtime));
    end
  end

  // ---- mechanisms ----
  int n_up = 0, n_down = 0, n_sat0 = 0, n_overload = 0, n_readout = 0;

  // Read back `nwords` words and rebuild the record; check it.
  task automatic analyse(input int nwords, input int nsamp, input int l0, input int res, input bit edges);
    logic [31:0] d;
    int c, step, k, e1, e2, kx1, kx2, flat;
    bit bits[$];
    real y, x;
    step = 1 << (DAC_W - res);
    wr_reg(REG_RD_ADDR, 32'd0);
    for (int w = 0; w < nwords; w++) begin
      rd_reg(REG_RD_DATA, d);
      for (int b = 0; b < 16; b++) bits.push_back(d[b]);
    end
    n_readout++;
    c = 0;
    e1 = -1; e2 = -1; kx1 = -1; kx2 = -1;
    flat = 0;
    for (k = 0; k < nsamp; k++) begin
      check(c == ys[l0 + k], $sformatf("sample %0d: rebuilt code %0d, feedback was %0d", k, c, ys[l0 + k]));
      if (c != ys[l0 + k]) break;
      x = xs[l0 + k];
      y = real'(c) * FS / real'(1 << DAC_W);
      // bit rule: 1 when the line was above the feedback
      if (bits[k] != (x > y)) begin
        check(1'b0, $sformatf("sample %0d: bit %0d with x=%f y=%f", k, bits[k], x, y));
      end
      if (k > 0 && xs[l0 + k] == xs[l0 + k - 1]) flat++; else flat = 0;
      if (flat >= 1000) check(x - y <= 2.0 * step * FS / 4096.0 && y - x <= 2.0 * step * FS / 4096.0,
                             $sformatf("sample %0d: tracking x=%f y=%f", k, x, y));
      if (x - y > 10.0 * step * FS / 4096.0) n_overload++;
      if (e1 < 0 && y >= UG / 4.0) e1 = k;
      if (e2 < 0 && y >= 3.0 * UG / 4.0) e2 = k;
      if (kx1 < 0 && x >= UG / 4.0) kx1 = k;
      if (kx2 < 0 && x >= 3.0 * UG / 4.0) kx2 = k;
      if (bits[k]) begin
        if (c + step <= (1 << DAC_W) - 1) begin c += step; n_up++; end
      end else begin
        if (c >= step) begin c -= step; n_down++; end else n_sat0++;
      end
    end
    for (k = nsamp; k < nwords * 16; k++) check(bits[k] == 1'b0, "flushed word padded with zeros");
    if (edges) begin
      check(e1 > 0 && e2 > e1, $sformatf("edges found at %0d and %0d", e1, e2));
      check(e1 >= kx1 && e1 - kx1 < 500, $sformatf("first edge: line at %0d, record at %0d", kx1, e1));
      check((e2 - e1) >= int'(10000.0 / T_RES_PS) - 50 && (e2 - e1) <= int'(10000.0 / T_RES_PS) + 50,
            $sformatf("round trip %0d samples, expected %0d", e2 - e1, int'(10000.0 / T_RES_PS)));
      $display("edges at samples %0d and %0d: round trip %0.1f ns", e1, e2, real'(e2 - e1) * T_RES_PS / 1000.0);
    end
  endtask

  initial begin
    logic [31:0] d;
    int l0;
    #1ns rst_n = 1'b0;
    #100ns rst_n = 1'b1;
    #200ns;
    // ---- one measurement at the reset configuration ----
    rd_reg(REG_FTW_LO, d);
    check(d == DEF_FTW[31:0], "reset tuning word: 1 ps step");
    wr_reg(REG_NSAMPLES, NREC);
    l0 = xs.size();
    wr_reg(REG_CTRL, 32'd1);
    do rd_reg(REG_STATUS, d); while (!d[1]);
    rd_reg(REG_WORDS, d);
    check(d == (NREC + 15) / 16, $sformatf("%0d words stored", d));
    rd_reg(REG_SAMPLES, d);
    check(d == NREC, $sformatf("%0d samples taken", d));
    analyse((NREC + 15) / 16, NREC, l0, 10, 1'b1);
    check(sram_viol == 0, "SRAM timing");
    $display("up %0d down %0d sat0 %0d", n_up, n_down, n_sat0);
    check(n_up > 0 && n_down > 0, "up and down steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
