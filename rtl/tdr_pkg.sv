// tdr_pkg: constants shared by the FPGA part of the delta-modulation TDR meter.
//
// Holds the register map seen by the housekeeping microcontroller over SPI,
// the SPI frame layout and the reset values of the run-time configuration.
// The reset values are the main operating point: 50 MHz system clock divided
// by 50 to a 1 MHz excitation square wave, and a DDS trigger 1 Hz below it,
// which gives a 1 ps equivalent-time step. The register map, the frame layout
// and the 12-bit feedback converter width are this design's own choices.
package tdr_pkg;

  // Registers, addressed by bits 6:0 of the SPI command byte.
  typedef enum logic [6:0] {
    REG_CTRL      = 7'h00,  // write: bit0 start, bit1 abort
    REG_STATUS    = 7'h01,  // read: bit0 busy, bit1 done, bit2 memory full
    REG_DIV       = 7'h02,  // excitation divider ratio (50 MHz / div)
    REG_FTW_LO    = 7'h03,  // DDS tuning word bits 31:0
    REG_FTW_HI    = 7'h04,  // DDS tuning word bits 47:32
    REG_NSAMPLES  = 7'h05,  // samples (bits) to record
    REG_RES       = 7'h06,  // integrator amplitude resolution in bits
    REG_INIT      = 7'h07,  // integrator start code
    REG_RD_ADDR   = 7'h08,  // write: SRAM word address for readout
    REG_RD_DATA   = 7'h09,  // read: SRAM word, then address advances
    REG_SAMPLES   = 7'h0A,  // read: samples taken in the current record
    REG_WORDS     = 7'h0B   // read: SRAM words written
  } reg_addr_e;

  localparam logic [15:0] DEF_DIV = 16'd50;
  // round((1 MHz - 1 Hz) * 2^48 / 200 MHz)
  localparam logic [47:0] DEF_FTW = 48'd1407373476178;
  localparam logic [3:0]  DEF_RES = 4'd10;

endpackage
