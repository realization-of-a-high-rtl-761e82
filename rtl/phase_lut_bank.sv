// phase_lut_bank: the eight phase LUT sets (56 block RAMs) that turn one
// block of eight sign-magnitude I/Q samples into eight phases in one
// 625/8 MHz block period. All sets share the write port, so one write from
// the host processor stores the same table entry in every set; the document
// loads every set from the processor but does not say whether the writes are
// shared, and sharing them is this design's choice.
//
// Timing: phases appear two clock cycles after blk_valid, with phase_valid.
module phase_lut_bank
  import difm_pkg::*;
#(
  parameter int unsigned SETS = BLOCK,
  parameter int unsigned AW   = LUT_AW,
  parameter int unsigned DW   = LUT_DW
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      wr_en,
  input  logic [AW-1:0]             wr_addr,
  input  logic [DW-1:0]             wr_data,
  input  logic                      blk_valid,
  input  logic [SETS-1:0][AW/2-1:0] mag_i,
  input  logic [SETS-1:0]           sign_i,
  input  logic [SETS-1:0][AW/2-1:0] mag_q,
  input  logic [SETS-1:0]           sign_q,
  output logic [SETS-1:0][PHASE_W-1:0] phases,
  output logic                      phases_valid
);

  logic [SETS-1:0] pv;

  for (genvar s = 0; s < SETS; s++) begin : g_set
    phase_lut #(.AW(AW), .DW(DW)) u_lut (
      .wr_clk     (clk),
      .wr_en      (wr_en),
      .wr_addr    (wr_addr),
      .wr_data    (wr_data),
      .rd_clk     (clk),
      .rst_n      (rst_n),
      .rd_en      (blk_valid),
      .mag_i      (mag_i[s]),
      .mag_q      (mag_q[s]),
      .sign_i     (sign_i[s]),
      .sign_q     (sign_q[s]),
      .phase      (phases[s]),
      .phase_valid(pv[s])
    );
  end

  // All sets share one read enable, so their valids are identical.
  assign phases_valid = &pv;

endmodule
