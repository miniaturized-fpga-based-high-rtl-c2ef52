// tb_control_logic: acts as the microcontroller's SPI master and as the
// integrator and memory around the control logic. Checks reset values (the
// 1 MHz / 1 ps configuration), register write and read-back, the measurement
// sequence (clear and load, run, stop after the requested sample count,
// flush, done), abort, and SRAM readout with auto-increment.
module tb_control_logic;
  import tdr_pkg::*;
  localparam int DAC_W = 12, AW = 17, DW = 16, NS_W = 22;
  logic             clk = 1'b0;
  logic             rst = 1'b1;
  logic             sclk = 1'b0, cs_n = 1'b1, mosi = 1'b0;
  logic             miso;
  logic [15:0]      cfg_div;
  logic [47:0]      cfg_ftw;
  logic [3:0]       cfg_res;
  logic [DAC_W-1:0] cfg_init;
  logic             run, int_load, rec_clear, rec_en, rec_flush;
  logic             samp_valid = 1'b0;
  logic [AW:0]      mem_wr_count = '0;
  logic             mem_full = 1'b0;
  logic             mem_rd_req;
  logic [AW-1:0]    mem_rd_addr;
  logic             mem_rd_done = 1'b0;
  logic [DW-1:0]    mem_rd_data = '0;
  logic             busy, done;
  int checks = 0, failures = 0;
  int n_load = 0, n_clear = 0, n_flush = 0, n_rec = 0;

  control_logic #(.DAC_W(DAC_W), .AW(AW), .DW(DW), .NS_W(NS_W)) dut (
    .clk, .rst, .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso),
    .cfg_div, .cfg_ftw, .cfg_res, .cfg_init,
    .run, .int_load, .rec_clear, .rec_en, .rec_flush, .samp_valid,
    .mem_wr_count, .mem_full, .mem_rd_req, .mem_rd_addr, .mem_rd_done, .mem_rd_data,
    .busy, .done);

  always #10ns clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // SPI mode 0 at 4 MHz: 125 ns half period.
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

  // Memory side: answer a read request with a word derived from its address.
  always @(posedge clk) begin
    mem_rd_done <= 1'b0;
    if (mem_rd_req) begin
      repeat (3) @(posedge clk);
      mem_rd_data <= DW'(mem_rd_addr) ^ 16'hA5C3;
      mem_rd_done <= 1'b1;
    end
  end

  always @(posedge clk) if (!rst) begin
    if (int_load)  n_load++;
    if (rec_clear) n_clear++;
    if (rec_flush) n_flush++;
    if (rec_en && samp_valid) n_rec++;
  end

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    #1ns rst = 1'b0;
    repeat (3) @(posedge clk);
    // reset values
    check(cfg_div == 16'd50, "default divider 50 (1 MHz)");
    check(cfg_ftw == 48'd1407373476178, "default tuning word (1 MHz - 1 Hz)");
    check(cfg_res == 4'd10, "default resolution 10 bit");
    rd_reg(REG_FTW_LO, d);
    check(d == 32'(48'd1407373476178), $sformatf("FTW_LO read %h", d));
    rd_reg(REG_FTW_HI, d);
    check(d == 32'(48'd1407373476178 >> 32), $sformatf("FTW_HI read %h", d));
    // writes
    wr_reg(REG_DIV, 32'd10);
    wr_reg(REG_FTW_LO, 32'hDEADBEEF);
    wr_reg(REG_FTW_HI, 32'h0000_1234);
    wr_reg(REG_RES, 32'd8);
    wr_reg(REG_INIT, 32'd100);
    wr_reg(REG_NSAMPLES, 32'd20);
    check(cfg_div == 16'd10, "divider written");
    check(cfg_ftw == 48'h1234_DEADBEEF, "tuning word written");
    check(cfg_res == 4'd8 && cfg_init == 12'd100, "resolution and start code written");
    rd_reg(REG_DIV, d);
    check(d == 32'd10, $sformatf("divider read back %0d", d));
    rd_reg(REG_NSAMPLES, d);
    check(d == 32'd20, "sample count read back");
    check(!run && !busy, "idle");
    // measurement of 20 samples
    wr_reg(REG_CTRL, 32'd1);
    check(busy && run && rec_en, "running after start");
    check(n_load == 1 && n_clear == 1, "integrator loaded and record cleared once");
    wr_reg(REG_DIV, 32'd77);
    check(cfg_div == 16'd10, "configuration locked while busy");
    rd_reg(REG_STATUS, d);
    check(d[0] == 1'b1 && d[1] == 1'b0, "status busy");
    for (int i = 0; i < 25; i++) begin
      @(negedge clk) samp_valid = 1'b1;
      @(negedge clk) samp_valid = 1'b0;
      repeat (10) @(negedge clk);
      if (i == 19) check(!run && !rec_en, "stopped after the 20th sample");
    end
    check(n_rec == 20, $sformatf("%0d samples recorded", n_rec));
    repeat (30) @(negedge clk);
    check(done && !busy && n_flush == 1, "done after flush");
    rd_reg(REG_SAMPLES, d);
    check(d == 32'd20, $sformatf("sample counter %0d", d));
    rd_reg(REG_STATUS, d);
    check(d[1:0] == 2'b10, "status done");
    // abort
    wr_reg(REG_NSAMPLES, 32'd1000);
    wr_reg(REG_CTRL, 32'd1);
    check(busy && !done, "second start");
    wr_reg(REG_CTRL, 32'd2);
    repeat (30) @(negedge clk);
    check(!busy && done && !run, "abort ends the measurement");
    // memory full ends a measurement
    wr_reg(REG_CTRL, 32'd1);
    @(negedge clk) mem_full = 1'b1;
    repeat (30) @(negedge clk);
    check(!busy && done, "memory full ends the measurement");
    mem_full = 1'b0;
    // readout: set address 5, then read 4 words
    wr_reg(REG_RD_ADDR, 32'd5);
    for (int i = 0; i < 4; i++) begin
      rd_reg(REG_RD_DATA, d);
      check(d[15:0] == (16'(5 + i) ^ 16'hA5C3), $sformatf("readout word %0d: %h", 5 + i, d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
