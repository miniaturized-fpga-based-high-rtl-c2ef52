// tdr_fpga_top: FPGA part of a delta-modulation equivalent-time TDR meter.
//
// The meter sends a repetitive square wave into a transmission line and
// records the voltage at the line input with picosecond equivalent-time
// resolution. A trigger a little slower than the excitation latches a
// comparator once per period, so each sample lands t_res = 1/f_trigger -
// 1/f_pulse later in the waveform than the one before. Instead of an A/D
// converter, the comparator and an up/down counter form a delta modulator:
// the counter drives a feedback D/A converter y(t) that tracks the line
// voltage x(t), and one bit per sample (x > y) is stored.
//
// Blocks, connected as in the original system:
//   clock_divider      50 MHz / div -> excitation square wave (line driver)
//   dds                48-bit DDS at 200 MHz -> external D/A, band-pass and
//                      Schmitt trigger -> trigger p(t)
//   trigger_delay      synchronises p(t), waits the 100 ns latch setup time
//   dm_integrator      reads the comparator, steps the counter, drives the
//                      feedback D/A (code -> y(t))
//   bit_shift_register packs the one-bit samples into 16-bit words
//   memory_controller  writes them to the 2 Mbit SRAM, reads them back
//   control_logic      SPI registers for the microcontroller, sequencing
//
// Clocks: `clk` is the 50 MHz system clock; `clk_dds` is the 200 MHz DDS
// clock made from it by a PLL outside this module. The only signal crossing
// from `clk` to `clk_dds` is `run`, synchronised in the DDS. `p_in` and
// `q_in` are asynchronous. From a trigger edge to the new feedback code the
// loop takes SETUP_CYCLES + PROC_CYCLES clocks (200 ns at 50 MHz), leaving
// 300 ns of the 500 ns loop for the D/A to settle at 2 MHz. `rst_n` is
// synchronised here and released synchronously. The SRAM data bus is split
// into an output, an output enable and an input; the pad tristate is outside.
module tdr_fpga_top #(
  parameter int unsigned DAC_W        = 12,
  parameter int unsigned DDS_OUT_W    = 14,
  parameter int unsigned SETUP_CYCLES = 5,
  parameter int unsigned PROC_CYCLES  = 5,
  parameter int unsigned SRAM_AW      = 17,
  parameter int unsigned SRAM_DW      = 16
) (
  input  logic                 clk,
  input  logic                 clk_dds,
  input  logic                 rst_n,
  // microcontroller
  input  logic                 spi_sclk,
  input  logic                 spi_cs_n,
  input  logic                 spi_mosi,
  output logic                 spi_miso,
  output logic                 busy,
  output logic                 done,
  // analog front end
  output logic                 pulse_out,
  output logic [DDS_OUT_W-1:0] dds_dac,
  input  logic                 p_in,
  input  logic                 q_in,
  output logic [DAC_W-1:0]     fb_dac,
  // SRAM
  output logic [SRAM_AW-1:0]   sram_addr,
  output logic [SRAM_DW-1:0]   sram_dq_o,
  output logic                 sram_dq_oe,
  input  logic [SRAM_DW-1:0]   sram_dq_i,
  output logic                 sram_ce_n,
  output logic                 sram_oe_n,
  output logic                 sram_we_n
);
  logic [1:0] rst_sync;
  logic       rst;
  logic [1:0] rst_dds_sync;
  logic       rst_dds;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rst_sync <= '1;
    else        rst_sync <= {rst_sync[0], 1'b0};
  end
  assign rst = rst_sync[1];

  always_ff @(posedge clk_dds or negedge rst_n) begin
    if (!rst_n) rst_dds_sync <= '1;
    else        rst_dds_sync <= {rst_dds_sync[0], 1'b0};
  end
  assign rst_dds = rst_dds_sync[1];

  logic [15:0]        cfg_div;
  logic [47:0]        cfg_ftw;
  logic [3:0]         cfg_res;
  logic [DAC_W-1:0]   cfg_init;
  logic               run, int_load, rec_clear, rec_en, rec_flush;
  logic               read_stb, bit_valid, bit_q;
  logic               word_valid;
  logic [SRAM_DW-1:0] word;
  logic [SRAM_AW:0]   mem_wr_count;
  logic               mem_full, mem_rd_req, mem_rd_done;
  logic [SRAM_AW-1:0] mem_rd_addr;
  logic [SRAM_DW-1:0] mem_rd_data;

  control_logic #(
    .DAC_W(DAC_W), .AW(SRAM_AW), .DW(SRAM_DW), .NS_W(SRAM_AW + $clog2(SRAM_DW) + 1)
  ) u_ctrl (
    .clk, .rst,
    .spi_sclk, .spi_cs_n, .spi_mosi, .spi_miso,
    .cfg_div, .cfg_ftw, .cfg_res, .cfg_init,
    .run, .int_load, .rec_clear, .rec_en, .rec_flush,
    .samp_valid(bit_valid),
    .mem_wr_count, .mem_full, .mem_rd_req, .mem_rd_addr, .mem_rd_done, .mem_rd_data,
    .busy, .done
  );

  clock_divider #(.CNT_W(16)) u_div (
    .clk, .rst, .run, .div(cfg_div), .pulse(pulse_out)
  );

  dds #(.ACC_W(48), .OUT_W(DDS_OUT_W)) u_dds (
    .clk(clk_dds), .rst(rst_dds), .run, .ftw(cfg_ftw), .dac(dds_dac)
  );

  trigger_delay #(.SETUP_CYCLES(SETUP_CYCLES)) u_delay (
    .clk, .rst, .p_async(p_in), .read_stb
  );

  dm_integrator #(.DAC_W(DAC_W), .PROC_CYCLES(PROC_CYCLES)) u_int (
    .clk, .rst, .load(int_load), .init(cfg_init), .res(cfg_res),
    .read_stb, .q_async(q_in), .code(fb_dac), .bit_valid, .bit_q
  );

  bit_shift_register #(.W(SRAM_DW)) u_sr (
    .clk, .rst, .clear(rec_clear), .bit_valid(bit_valid && rec_en), .bit_in(bit_q),
    .flush(rec_flush), .word_valid, .word
  );

  memory_controller #(.AW(SRAM_AW), .DW(SRAM_DW)) u_mem (
    .clk, .rst, .clear(rec_clear),
    .wr_valid(word_valid), .wr_data(word), .wr_count(mem_wr_count), .full(mem_full),
    .rd_req(mem_rd_req), .rd_addr(mem_rd_addr), .rd_done(mem_rd_done), .rd_data(mem_rd_data),
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i, .sram_ce_n, .sram_oe_n, .sram_we_n
  );
endmodule
