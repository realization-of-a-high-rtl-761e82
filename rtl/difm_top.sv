// difm_top: high speed RF data acquisition, phase and frequency path.
//
// A radar pulse arrives as I and Q, digitised at 625 MSPS; the 7 most
// significant bits of every sample reach this logic over two DDR lanes per
// channel clocked at 625/4 MHz (clk). The chain is:
//   ddr_capture        4 I + 4 Q samples per clk
//   block_formatter    blocks of 8 sign-magnitude samples, one per 2 clk
//   phase_lut_bank     8 table look-ups per block: 8 phases 0..359 degrees
//   phase_capture_ctrl 128 phases (16 blocks) latched while the trigger is high
//   modal_filter x3    most likely phase difference at lags T, 4T and 16T
//   ambiguity_resolver unwrapped phi_16T, 0 .. 16*360 degrees
// The unwrapped phase, rounded to whole degrees, is the address of the
// external frequency table (freq_lut_addr, strobed by freq_lut_valid): one
// address per 128 samples while the trigger is high. The host processor loads
// the phase table and the threshold DAC code over SPI (spi_config); the
// external comparator's output (thr_in) becomes the data-valid trigger and
// its high time is reported as the pulse width.
//
// The chain, its sizes and rates follow the document; the estimate formats,
// the SPI frame, the trigger handling and the DAC code width are this
// design's choices. Every block is in the single clk domain; the 625/8 MHz
// block rate is a strobe every second clk cycle.
//
// Timing: freq_lut_valid comes about 47 clk cycles after the last sample of a
// window reaches the pins.
module difm_top
  import difm_pkg::*;
(
  input  logic                 clk,          // 625/4 MHz
  input  logic                 rst_n,
  // ADC DDR lanes: [0] direct, [1] delayed
  input  logic [DDR_LANES-1:0][SAMPLE_W-1:0] adc_i,
  input  logic [DDR_LANES-1:0][SAMPLE_W-1:0] adc_q,
  // comparator output (video channel 2 against the DAC reference)
  input  logic                 thr_in,
  // SPI from the host processor
  input  logic                 spi_sclk,
  input  logic                 spi_mosi,
  input  logic                 spi_cs_n,
  // threshold DAC
  output logic [DAC_W-1:0]     dac_code,
  // external frequency table
  output logic                 freq_lut_valid,
  output logic [FADDR_W-1:0]   freq_lut_addr,
  // measurement detail
  output logic [UNWRAP_W-1:0]  phi16_unwrapped,   // 1/8 degree
  output logic [EST_W-1:0]     phi_t,             // 1/8 degree
  output logic [EST_W-1:0]     phi_4t,
  output logic [EST_W-1:0]     phi_16t,
  output logic                 win_abort,
  // pulse width in clk cycles
  output logic                 pw_valid,
  output logic [15:0]          pw_count
);

  // ---------------- configuration ----------------
  logic                lut_wr_en;
  logic [LUT_AW-1:0]   lut_wr_addr;
  logic [LUT_DW-1:0]   lut_wr_data;

  spi_config u_spi (
    .clk, .rst_n, .spi_sclk, .spi_mosi, .spi_cs_n,
    .lut_wr_en, .lut_wr_addr, .lut_wr_data, .dac_code
  );

  // ---------------- trigger and pulse width ----------------
  logic dv;
  pulse_width_meter #(.PW_W(16)) u_pw (
    .clk, .rst_n, .thr_in, .dv, .pw_valid, .pw_count
  );

  // ---------------- acquisition ----------------
  logic [2*DDR_LANES-1:0][SAMPLE_W-1:0] i_s, q_s;
  logic                                 ddr_valid;

  ddr_capture u_ddr (
    .clk, .rst_n, .i_lane(adc_i), .q_lane(adc_q), .i_s, .q_s, .valid(ddr_valid)
  );

  logic                       blk_valid;
  logic [BLOCK-1:0][MAG_W-1:0] i_mag, q_mag;
  logic [BLOCK-1:0]           i_sign, q_sign;

  block_formatter u_fmt (
    .clk, .rst_n, .in_valid(ddr_valid), .i_s, .q_s,
    .blk_valid, .i_mag, .i_sign, .q_mag, .q_sign
  );

  // ---------------- phase look-up ----------------
  logic [BLOCK-1:0][PHASE_W-1:0] phases;
  logic                          phases_valid;

  phase_lut_bank u_lut (
    .clk, .rst_n,
    .wr_en(lut_wr_en), .wr_addr(lut_wr_addr), .wr_data(lut_wr_data),
    .blk_valid, .mag_i(i_mag), .sign_i(i_sign), .mag_q(q_mag), .sign_q(q_sign),
    .phases, .phases_valid
  );

  // ---------------- 128-phase latch ----------------
  logic [WINDOW-1:0][PHASE_W-1:0] latch;
  logic                           win_valid;

  phase_capture_ctrl u_ctrl (
    .clk, .rst_n, .trig(dv), .phases_valid, .phases,
    .latch, .win_valid, .win_abort
  );

  // ---------------- modal filters ----------------
  logic [2:0] est_valid;
  logic [2:0][EST_W-1:0] est;

  localparam int unsigned LAGS [3] = '{1, 4, 16};
  for (genvar f = 0; f < 3; f++) begin : g_filt
    logic [$clog2(WINDOW+1)-1:0] cnt_unused;
    logic [$clog2(NBINS)-1:0]    grp_unused;
    modal_filter #(.LAG(LAGS[f])) u_mf (
      .clk, .rst_n, .start(win_valid), .phases(latch),
      .est_valid(est_valid[f]), .est(est[f]),
      .est_count(cnt_unused), .est_group(grp_unused)
    );
  end

  assign phi_t   = est[0];
  assign phi_4t  = est[1];
  assign phi_16t = est[2];

  // ---------------- ambiguity resolution ----------------
  logic                res_valid;
  logic [UNWRAP_W-1:0] phi4_unused;

  ambiguity_resolver u_amb (
    .clk, .rst_n, .in_valid(&est_valid),
    .phi_t(est[0]), .phi_4t(est[1]), .phi_16t(est[2]),
    .out_valid(res_valid), .phi4_unwrapped(phi4_unused), .phi16_unwrapped
  );

  // ---------------- external frequency table address ----------------
  // Round to whole degrees; 16*360 wraps to 0.
  logic [UNWRAP_W-FRAC_W:0] addr_r;
  always_comb addr_r = (UNWRAP_W-FRAC_W+1)'((phi16_unwrapped + UNWRAP_W'(1 << (FRAC_W-1))) >> FRAC_W);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      freq_lut_valid <= 1'b0;
      freq_lut_addr  <= '0;
    end else begin
      freq_lut_valid <= res_valid;
      if (res_valid)
        freq_lut_addr <= (addr_r >= (UNWRAP_W-FRAC_W+1)'(16*360)) ? '0
                         : FADDR_W'(addr_r);
    end
  end

endmodule
