// block_formatter_tb: feeds random 7-bit two's complement words (the most
// negative code included), with and without gaps in in_valid, and checks
// every block of eight against a reference built from the input words:
// order of samples, sign bits, magnitudes with -64 saturating to 63, and
// that a block leaves one cycle after the word that completes it.
`timescale 1ns/1ps
module block_formatter_tb;
  import difm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [3:0][6:0] i_s, q_s;
  logic blk_valid;
  logic [7:0][5:0] i_mag, q_mag;
  logic [7:0] i_sign, q_sign;
  int checks = 0, failures = 0, blocks = 0, saturations = 0;

  block_formatter dut (.clk, .rst_n, .in_valid, .i_s, .q_s,
                       .blk_valid, .i_mag, .i_sign, .q_mag, .q_sign);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0][7:0] exp_i, exp_q;     // signed expected samples
  int nwords = 0;

  function automatic int mag_of(int v);
    if (v < 0) v = -v;
    return (v > 63) ? 63 : v;
  endfunction

  initial begin
    int v;
    bit expect_blk;
    i_s = '0; q_s = '0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      expect_blk = 0;
      in_valid = ($urandom_range(0, 3) != 0);
      if (in_valid) begin
        for (int j = 0; j < 4; j++) begin
          v = $urandom_range(0, 127);
          if ($urandom_range(0, 15) == 0) v = 64;      // -64
          if (v == 64) saturations++;
          i_s[j] = 7'(v);
          exp_i[(nwords % 2) * 4 + j] = 8'(v >= 64 ? v - 128 : v);
          v = $urandom_range(0, 127);
          q_s[j] = 7'(v);
          exp_q[(nwords % 2) * 4 + j] = 8'(v >= 64 ? v - 128 : v);
        end
        nwords++;
        expect_blk = (nwords % 2 == 0);
      end
      @(posedge clk);
      #1;
      checks++;
      if (blk_valid !== expect_blk) begin
        failures++;
        $display("blk_valid=%0d expected %0d", blk_valid, expect_blk);
      end
      if (expect_blk) begin
        blocks++;
        for (int k = 0; k < 8; k++) begin
          int ei, eq;
          ei = int'($signed(exp_i[k]));
          eq = int'($signed(exp_q[k]));
          checks += 4;
          if (int'(i_mag[k]) != mag_of(ei)) failures++;
          if (int'(q_mag[k]) != mag_of(eq)) failures++;
          if (i_sign[k] != (ei < 0)) failures++;
          if (q_sign[k] != (eq < 0)) failures++;
        end
      end
    end
    checks++;
    if (blocks < 500 || saturations == 0) failures++;
    $display("blocks=%0d saturations=%0d", blocks, saturations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
