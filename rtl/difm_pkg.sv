// difm_pkg: sizes and types shared by the digital instantaneous frequency
// measurement (DIFM) data path.
//
// The ADC delivers the 7 most significant bits of each I and Q sample
// (a sign and 6 magnitude bits) at 625 MSPS over two DDR lanes per channel
// clocked at 625/4 MHz. Eight samples form a block; 128 samples (16 blocks)
// form one measurement window. Phases are whole degrees 0..359 (9 bits);
// phase estimates carry 3 fractional bits (12 bits, 1/8 degree units).
// The sizes follow the document; the fixed-point formats, the 8-bit DAC
// code and the SPI command codes are this design's choices.
package difm_pkg;

  localparam int unsigned SAMPLE_W   = 7;    // 6 magnitude bits + sign
  localparam int unsigned MAG_W      = 6;
  localparam int unsigned DDR_LANES  = 2;    // I and Id (Q and Qd)
  localparam int unsigned BLOCK      = 8;    // samples per block
  localparam int unsigned WINDOW     = 128;  // samples per frequency update
  localparam int unsigned LUT_AW     = 12;   // {|I|, |Q|}
  localparam int unsigned LUT_DW     = 7;    // 0..90 degrees
  localparam int unsigned PHASE_W    = 9;    // 0..359 degrees
  localparam int unsigned FRAC_W     = 3;    // fractional bits of an estimate
  localparam int unsigned EST_W      = PHASE_W + FRAC_W;  // 12 bits
  localparam int unsigned NBINS      = 16;   // modal filter groups
  localparam int unsigned UNWRAP_W   = 16;   // 0 .. 16*360 degrees, 1/8 units
  localparam int unsigned FADDR_W    = 13;   // 0 .. 5759 whole degrees
  localparam int unsigned DAC_W      = 8;

  // 360 degrees in estimate units (1/8 degree)
  localparam int unsigned FULL_TURN  = 360 << FRAC_W;

  typedef logic [SAMPLE_W-1:0] sample_t;   // two's complement ADC word
  typedef logic [MAG_W-1:0]    mag_t;
  typedef logic [PHASE_W-1:0]  phase_t;
  typedef logic [EST_W-1:0]    est_t;

  // SPI command nibble (frame bits 23:20)
  typedef enum logic [3:0] {
    CMD_NOP       = 4'h0,
    CMD_LUT_WRITE = 4'h1,
    CMD_DAC_WRITE = 4'h2
  } spi_cmd_e;

endpackage
