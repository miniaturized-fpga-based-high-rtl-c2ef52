// control_logic: the FPGA's general control logic.
//
// The housekeeping microcontroller configures and starts a measurement over
// SPI (see spi_slave for the frame and tdr_pkg for the register map) and
// reads the record back. Configuration: excitation divider ratio, 48-bit DDS
// tuning word, number of one-bit samples to record, integrator resolution and
// start code. Reset values give the main configuration: 1 MHz excitation,
// trigger 1 Hz lower (1 ps equivalent-time step), 10-bit resolution,
// integrator starting at 0.
//
// A measurement (CTRL bit 0 written with 1 while idle): the memory write
// pointer and the shift register are cleared and the integrator loaded with
// its start code; then `run` restarts the excitation divider and the DDS
// phase together, so the record starts at a known phase. Every integrator
// sample (`samp_valid`) is recorded while `rec_en` is high, until the
// requested number has been taken or the memory is full. Then `run` drops,
// the partial last word is flushed and, FLUSH_WAIT clocks later, `done` is set.
// CTRL bit 1 aborts. Readout: writing RD_ADDR fetches that SRAM word; each
// complete read of RD_DATA returns the fetched word and fetches the next.
// The original circuit names this block and its SPI link; the register map
// and the sequencing are this design's own choices.
module control_logic
  import tdr_pkg::*;
#(
  parameter int unsigned DAC_W      = 12,
  parameter int unsigned AW         = 17,
  parameter int unsigned DW         = 16,
  parameter int unsigned NS_W       = 22,
  parameter int unsigned FLUSH_WAIT = 16
) (
  input  logic             clk,
  input  logic             rst,
  // SPI from the microcontroller
  input  logic             spi_sclk,
  input  logic             spi_cs_n,
  input  logic             spi_mosi,
  output logic             spi_miso,
  // configuration
  output logic [15:0]      cfg_div,
  output logic [47:0]      cfg_ftw,
  output logic [3:0]       cfg_res,
  output logic [DAC_W-1:0] cfg_init,
  // measurement sequencing
  output logic             run,
  output logic             int_load,
  output logic             rec_clear,
  output logic             rec_en,
  output logic             rec_flush,
  input  logic             samp_valid,
  // memory controller
  input  logic [AW:0]      mem_wr_count,
  input  logic             mem_full,
  output logic             mem_rd_req,
  output logic [AW-1:0]    mem_rd_addr,
  input  logic             mem_rd_done,
  input  logic [DW-1:0]    mem_rd_data,
  // status
  output logic             busy,
  output logic             done
);
  typedef enum logic [2:0] {M_IDLE, M_CLEAR, M_RUN, M_FLUSH, M_WAIT} mstate_e;

  logic        wr_stb, rd_end;
  logic [6:0]  cmd_addr;
  logic [31:0] wdata, rdata;

  logic [NS_W-1:0] cfg_nsamples;
  logic [NS_W-1:0] samples;
  logic [DW-1:0]   rd_word;
  mstate_e         mstate;
  logic [7:0]      wcnt;
  logic            start_req, abort_req;

  spi_slave u_spi (
    .clk, .rst,
    .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso),
    .cmd_addr, .rdata, .wr_stb, .wdata, .rd_end
  );

  // Register writes.
  always_ff @(posedge clk) begin
    if (rst) begin
      cfg_div      <= DEF_DIV;
      cfg_ftw      <= DEF_FTW;
      cfg_res      <= DEF_RES;
      cfg_init     <= '0;
      cfg_nsamples <= NS_W'(1) << (NS_W - 1);      // whole memory: 2^21 bits
      start_req    <= 1'b0;
      abort_req    <= 1'b0;
    end else begin
      start_req <= 1'b0;
      abort_req <= 1'b0;
      if (wr_stb) begin
        unique case (cmd_addr)
          REG_CTRL:     begin start_req <= wdata[0]; abort_req <= wdata[1]; end
          REG_DIV:      if (!busy) cfg_div <= wdata[15:0];
          REG_FTW_LO:   if (!busy) cfg_ftw[31:0] <= wdata;
          REG_FTW_HI:   if (!busy) cfg_ftw[47:32] <= wdata[15:0];
          REG_NSAMPLES: if (!busy) cfg_nsamples <= wdata[NS_W-1:0];
          REG_RES:      if (!busy) cfg_res <= wdata[3:0];
          REG_INIT:     if (!busy) cfg_init <= wdata[DAC_W-1:0];
          default: ;
        endcase
      end
    end
  end

  // Register reads: the value is sampled by the SPI slave on the falling
  // SCLK edge after the command byte.
  always_comb begin
    unique case (cmd_addr)
      REG_STATUS:   rdata = {29'd0, mem_full, done, busy};
      REG_DIV:      rdata = {16'd0, cfg_div};
      REG_FTW_LO:   rdata = cfg_ftw[31:0];
      REG_FTW_HI:   rdata = {16'd0, cfg_ftw[47:32]};
      REG_NSAMPLES: rdata = 32'(cfg_nsamples);
      REG_RES:      rdata = {28'd0, cfg_res};
      REG_INIT:     rdata = 32'(cfg_init);
      REG_RD_ADDR:  rdata = 32'(mem_rd_addr);
      REG_RD_DATA:  rdata = 32'(rd_word);
      REG_SAMPLES:  rdata = 32'(samples);
      REG_WORDS:    rdata = 32'(mem_wr_count);
      default:      rdata = 32'd0;
    endcase
  end

  // Readout prefetch.
  always_ff @(posedge clk) begin
    if (rst) begin
      mem_rd_req  <= 1'b0;
      mem_rd_addr <= '0;
      rd_word     <= '0;
    end else begin
      mem_rd_req <= 1'b0;
      if (wr_stb && cmd_addr == REG_RD_ADDR) begin
        mem_rd_addr <= wdata[AW-1:0];
        mem_rd_req  <= 1'b1;
      end else if (rd_end && cmd_addr == REG_RD_DATA) begin
        mem_rd_addr <= mem_rd_addr + AW'(1);
        mem_rd_req  <= 1'b1;
      end
      if (mem_rd_done) rd_word <= mem_rd_data;
    end
  end

  // Measurement sequencer.
  always_ff @(posedge clk) begin
    if (rst) begin
      mstate    <= M_IDLE;
      run       <= 1'b0;
      int_load  <= 1'b0;
      rec_clear <= 1'b0;
      rec_en    <= 1'b0;
      rec_flush <= 1'b0;
      samples   <= '0;
      wcnt      <= '0;
      done      <= 1'b0;
    end else begin
      int_load  <= 1'b0;
      rec_clear <= 1'b0;
      rec_flush <= 1'b0;
      if (rec_en && samp_valid) samples <= samples + NS_W'(1);
      unique case (mstate)
        M_IDLE: if (start_req) begin
          rec_clear <= 1'b1;
          int_load  <= 1'b1;
          samples   <= '0;
          done      <= 1'b0;
          mstate    <= M_CLEAR;
        end
        M_CLEAR: begin
          run    <= 1'b1;
          rec_en <= 1'b1;
          mstate <= M_RUN;
        end
        M_RUN: begin
          if (abort_req || mem_full ||
              (rec_en && samp_valid && samples + NS_W'(1) >= cfg_nsamples)) begin
            run    <= 1'b0;
            rec_en <= 1'b0;
            mstate <= M_FLUSH;
          end
        end
        M_FLUSH: begin
          rec_flush <= 1'b1;
          wcnt      <= 8'(FLUSH_WAIT);
          mstate    <= M_WAIT;
        end
        M_WAIT: begin
          if (wcnt == 8'd0) begin
            done   <= 1'b1;
            mstate <= M_IDLE;
          end else begin
            wcnt <= wcnt - 8'd1;
          end
        end
        default: mstate <= M_IDLE;
      endcase
    end
  end

  assign busy = (mstate != M_IDLE);
endmodule
