// phase_lut: one phase look-up set.
//
// Seven 4K x 1 block RAMs side by side form a 4K x 7 table holding the
// first-quadrant angle atan(|Q|/|I|) in whole degrees (0..90), loaded by the
// host processor through the write port. The read address is the pair of
// magnitudes {|I|, |Q|} (|I| in the upper six bits, this design's choice).
// The "0-2pi scale" stage folds the table angle a into 0..359 degrees with
// the two sign bits:
//   I>=0, Q>=0 : a          I<0, Q>=0 : 180 - a
//   I<0,  Q<0  : 180 + a    I>=0, Q<0 : 360 - a  (0 stays 0)
// Table values above 90 are treated as 90.
//
// Structure, widths (12-bit address, 7-bit data, 9-bit phase) and the port
// set (separate write and read clocks and enables) follow the document.
//
// Timing: phase and phase_valid appear two read-clock cycles after rd_en
// (one cycle for the RAM, one for the scale register).
module phase_lut
  import difm_pkg::*;
#(
  parameter int unsigned AW = LUT_AW,
  parameter int unsigned DW = LUT_DW
) (
  // write port (host processor)
  input  logic          wr_clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data,
  // read port
  input  logic          rd_clk,
  input  logic          rst_n,
  input  logic          rd_en,
  input  logic [AW/2-1:0] mag_i,
  input  logic [AW/2-1:0] mag_q,
  input  logic          sign_i,
  input  logic          sign_q,
  output logic [PHASE_W-1:0] phase,
  output logic          phase_valid
);

  logic [AW-1:0] rd_addr;
  logic [DW-1:0] rd_data;
  assign rd_addr = {mag_i, mag_q};

  for (genvar b = 0; b < DW; b++) begin : g_bit
    bram_4kx1 #(.AW(AW)) u_ram (
      .wr_clk (wr_clk),
      .wr_en  (wr_en),
      .wr_addr(wr_addr),
      .wr_data(wr_data[b]),
      .rd_clk (rd_clk),
      .rd_en  (rd_en),
      .rd_addr(rd_addr),
      .rd_data(rd_data[b])
    );
  end

  // Signs travel alongside the RAM read.
  logic sgn_i_d, sgn_q_d, rd_en_d;
  always_ff @(posedge rd_clk or negedge rst_n) begin
    if (!rst_n) begin
      sgn_i_d <= 1'b0;
      sgn_q_d <= 1'b0;
      rd_en_d <= 1'b0;
    end else begin
      if (rd_en) begin
        sgn_i_d <= sign_i;
        sgn_q_d <= sign_q;
      end
      rd_en_d <= rd_en;
    end
  end

  logic [PHASE_W-1:0] a, scaled;
  always_comb begin
    a = (rd_data > DW'(90)) ? PHASE_W'(90) : PHASE_W'(rd_data);
    unique case ({sgn_i_d, sgn_q_d})
      2'b00:   scaled = a;
      2'b10:   scaled = PHASE_W'(180) - a;
      2'b11:   scaled = PHASE_W'(180) + a;
      default: scaled = (a == '0) ? '0 : PHASE_W'(360) - a;
    endcase
  end

  always_ff @(posedge rd_clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= '0;
      phase_valid <= 1'b0;
    end else begin
      phase_valid <= rd_en_d;
      if (rd_en_d) phase <= scaled;
    end
  end

endmodule
