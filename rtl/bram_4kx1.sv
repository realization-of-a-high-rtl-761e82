// bram_4kx1: one 4K x 1 block RAM with a write port and a registered read
// port on separate clocks, the building block of the phase LUT (seven of
// them side by side make one 4K x 7 table). Read data appears one read-clock
// cycle after rd_en. Contents are undefined until written.
module bram_4kx1 #(
  parameter int unsigned AW = 12
) (
  input  logic          wr_clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic          wr_data,
  input  logic          rd_clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_data
);

  logic mem [2**AW];

  always_ff @(posedge wr_clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge rd_clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
