// spi_config_tb: acts as the host processor. It sends random LUT writes and
// DAC writes as 24-bit mode-0 SPI frames (MSB first, SCLK at one eighth of
// the system clock), a NOP frame, and a frame cut short by chip select,
// and checks that every LUT write appears once with its address and data,
// that nothing is written for the NOP or the cut frame, and that the DAC
// code follows the last DAC write.
`timescale 1ns/1ps
module spi_config_tb;
  import difm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sclk = 1'b0, mosi = 1'b0, cs_n = 1'b1;
  logic lut_wr_en;
  logic [11:0] lut_wr_addr;
  logic [6:0] lut_wr_data;
  logic [7:0] dac_code;
  int checks = 0, failures = 0, writes = 0, dac_writes = 0;

  spi_config dut (.clk, .rst_n, .spi_sclk(sclk), .spi_mosi(mosi), .spi_cs_n(cs_n),
                  .lut_wr_en, .lut_wr_addr, .lut_wr_data, .dac_code);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [18:0] expq[$];   // {addr, data}

  always @(posedge clk) begin
    if (lut_wr_en) begin
      writes++;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected LUT write %h", lut_wr_addr);
      end else if ({lut_wr_addr, lut_wr_data} != expq.pop_front()) begin
        failures++;
        $display("LUT write %h=%h wrong", lut_wr_addr, lut_wr_data);
      end
    end
  end

  task automatic spi_bits(logic [23:0] w, int nbits);
    cs_n = 1'b0;
    repeat (4) @(negedge clk);
    for (int b = 23; b > 23 - nbits; b--) begin
      mosi = w[b];
      repeat (4) @(negedge clk);
      sclk = 1'b1;
      repeat (4) @(negedge clk);
      sclk = 1'b0;
    end
    repeat (4) @(negedge clk);
    cs_n = 1'b1;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    logic [7:0] dac_exp;
    dac_exp = '0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      int kind;
      logic [11:0] a;
      logic [7:0] d;
      kind = $urandom_range(0, 9);
      a = 12'($urandom);
      d = 8'($urandom);
      if (kind < 7) begin
        d[7] = 1'b0;
        expq.push_back({a, d[6:0]});
        spi_bits({4'h1, a, d}, 24);
      end else if (kind == 7) begin
        dac_exp = d;
        dac_writes++;
        spi_bits({4'h2, a, d}, 24);
        checks++;
        if (dac_code != dac_exp) begin
          failures++;
          $display("dac_code %h expected %h", dac_code, dac_exp);
        end
      end else if (kind == 8) begin
        spi_bits({4'h0, a, d}, 24);          // NOP
      end else begin
        spi_bits({4'h1, a, d}, 13);          // cut short: no write
      end
    end
    repeat (20) @(posedge clk);
    checks += 2;
    if (expq.size() != 0) failures++;
    if (dac_code != dac_exp || dac_writes == 0) failures++;
    $display("lut writes=%0d dac writes=%0d", writes, dac_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
