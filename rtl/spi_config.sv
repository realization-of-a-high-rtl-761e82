// spi_config: SPI slave through which the host processor configures the
// data path: it loads the phase-angle table at power on and programs the
// threshold DAC code.
//
// Frames are 24 bits, SPI mode 0 (data sampled on the rising SCLK edge),
// most significant bit first, framed by an active-low chip select:
//   bits 23:20 command   1 = phase LUT write, 2 = DAC code write
//   bits 19:8  address   phase LUT address {|I|, |Q|} (LUT writes only)
//   bits 7:0   data      LUT value 0..90 in bits 6:0, or the DAC code
// A write is issued when the 24th bit of a frame has been received; further
// bits in the same frame start a new frame. SCLK, MOSI and CS_N are
// synchronised into the system clock with two flip-flops each, so SCLK must
// stay below one quarter of the system clock.
//
// The document says only that the processor reaches the FPGA over SPI and
// loads the table and the DAC input; the frame format, the command codes and
// the oversampling receiver are this design's choices.
//
// Timing: lut_wr_en (or dac_code) updates three system clock cycles after
// the SCLK rising edge that carries the last bit of a frame.
module spi_config
  import difm_pkg::*;
#(
  parameter int unsigned AW    = LUT_AW,
  parameter int unsigned DW    = LUT_DW,
  parameter int unsigned DACW  = DAC_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            spi_sclk,
  input  logic            spi_mosi,
  input  logic            spi_cs_n,
  output logic            lut_wr_en,
  output logic [AW-1:0]   lut_wr_addr,
  output logic [DW-1:0]   lut_wr_data,
  output logic [DACW-1:0] dac_code
);

  localparam int unsigned FRAME = 24;

  logic [2:0] sclk_s;           // third stage detects the rising edge
  logic [1:0] mosi_s, cs_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0;
      mosi_s <= '0;
      cs_s   <= '1;
    end else begin
      sclk_s <= {sclk_s[1:0], spi_sclk};
      mosi_s <= {mosi_s[0], spi_mosi};
      cs_s   <= {cs_s[0], spi_cs_n};
    end
  end

  logic sclk_rise;
  assign sclk_rise = sclk_s[1] && !sclk_s[2];

  logic [FRAME-2:0]          shreg;
  logic [$clog2(FRAME)-1:0]  nbits;
  logic [FRAME-1:0]          frame;
  assign frame = {shreg, mosi_s[1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg       <= '0;
      nbits       <= '0;
      lut_wr_en   <= 1'b0;
      lut_wr_addr <= '0;
      lut_wr_data <= '0;
      dac_code    <= '0;
    end else begin
      lut_wr_en <= 1'b0;
      if (cs_s[1]) begin
        nbits <= '0;
      end else if (sclk_rise) begin
        shreg <= frame[FRAME-2:0];
        if (nbits == ($clog2(FRAME))'(FRAME-1)) begin
          nbits <= '0;
          unique case (spi_cmd_e'(frame[23:20]))
            CMD_LUT_WRITE: begin
              lut_wr_en   <= 1'b1;
              lut_wr_addr <= frame[8 +: AW];
              lut_wr_data <= frame[0 +: DW];
            end
            CMD_DAC_WRITE: dac_code <= frame[0 +: DACW];
            default: ;
          endcase
        end else begin
          nbits <= nbits + 1'b1;
        end
      end
    end
  end

endmodule
