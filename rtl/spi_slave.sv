// spi_slave: register-access SPI slave for the housekeeping microcontroller.
//
// SPI mode 0 (data sampled on the rising SCLK edge, changed on the falling
// one), MSB first. A frame is an 8-bit command, bit 7 = write and bits 6:0 =
// register, followed by 32 data bits. For a read, `cmd_addr` selects the register as
// soon as the command byte is in; its value is taken from `rdata` on the next
// falling SCLK edge and shifted out on MISO. For a write,
// `wr_stb` pulses with `cmd_addr` and `wdata` after the 40th bit. `rd_end`
// pulses at the end of a complete read frame, so a register with a read side
// effect can act on it. The frame layout is this design's own; the original
// only says the microcontroller controls the FPGA over a custom SPI.
//
// SCLK, CS_N and MOSI are oversampled by `clk` through two-flop synchronisers,
// so SCLK must stay below about clk/12 (4 MHz at 50 MHz) and `rdata` must be
// valid within two clocks of `cmd_addr` changing. Raising CS_N aborts a frame.
module spi_slave (
  input  logic        clk,
  input  logic        rst,
  input  logic        sclk,
  input  logic        cs_n,
  input  logic        mosi,
  output logic        miso,
  output logic [6:0]  cmd_addr,
  input  logic [31:0] rdata,
  output logic        wr_stb,
  output logic [31:0] wdata,
  output logic        rd_end
);
  logic [2:0]  sclk_s;
  logic [1:0]  cs_s;
  logic [1:0]  mosi_s;
  logic        sclk_rise, sclk_fall, active;
  logic        cmd_write;
  logic [5:0]  bitcnt;          // rising edges seen in this frame
  logic [30:0] rx;
  logic [31:0] tx;

  always_ff @(posedge clk) begin
    if (rst) begin
      sclk_s <= '0;
      cs_s   <= '1;
      mosi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[0], cs_n};
      mosi_s <= {mosi_s[0], mosi};
    end
  end

  assign sclk_rise = sclk_s[1] & ~sclk_s[2];
  assign sclk_fall = ~sclk_s[1] & sclk_s[2];
  assign active    = ~cs_s[1];

  always_ff @(posedge clk) begin
    if (rst || !active) begin
      bitcnt    <= '0;
      rx        <= '0;
      tx        <= '0;
      miso      <= 1'b0;
      wr_stb    <= 1'b0;
      rd_end    <= 1'b0;
      cmd_addr  <= '0;
      cmd_write <= 1'b0;
      wdata     <= '0;
    end else begin
      wr_stb  <= 1'b0;
      rd_end  <= 1'b0;
      if (sclk_rise && bitcnt < 6'd40) begin
        rx     <= {rx[29:0], mosi_s[1]};
        bitcnt <= bitcnt + 6'd1;
        if (bitcnt == 6'd7) begin
          cmd_write <= rx[6];
          cmd_addr  <= {rx[5:0], mosi_s[1]};
        end
        if (bitcnt == 6'd39) begin
          if (cmd_write) begin
            wr_stb <= 1'b1;
            wdata  <= {rx[30:0], mosi_s[1]};
          end else begin
            rd_end <= 1'b1;
          end
        end
      end
      if (sclk_fall) begin
        if (bitcnt == 6'd8) begin
          miso <= rdata[31];
          tx   <= {rdata[30:0], 1'b0};
        end else if (bitcnt > 6'd8 && bitcnt < 6'd40) begin
          miso <= tx[31];
          tx   <= {tx[30:0], 1'b0};
        end
      end
    end
  end
endmodule
