// block_formatter: buffer and sign-magnitude conversion.
//
// Collects two consecutive DDR words of four samples per channel into a
// block of eight I and eight Q samples and converts every two's complement
// sample into a sign bit and a 6-bit magnitude, the form that addresses the
// phase LUT. A block leaves once every second input word, so blocks run at
// 625/8 MHz as a one-cycle blk_valid strobe in the 625/4 MHz clock domain.
//
// The document gives the function (buffer, sign-magnitude conversion, blocks
// of 8). The two's complement input coding and the saturation of the most
// negative code (-64 becomes magnitude 63) are this design's choices.
//
// Timing: a block is registered one cycle after the input word that
// completes it; sample index 0 is the oldest.
module block_formatter
  import difm_pkg::*;
#(
  parameter int unsigned W   = SAMPLE_W,
  parameter int unsigned IN  = 2 * DDR_LANES,   // samples per input word
  parameter int unsigned OUT = BLOCK            // samples per block
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [IN-1:0][W-1:0]   i_s,
  input  logic [IN-1:0][W-1:0]   q_s,
  output logic                   blk_valid,
  output logic [OUT-1:0][W-2:0]  i_mag,
  output logic [OUT-1:0]         i_sign,
  output logic [OUT-1:0][W-2:0]  q_mag,
  output logic [OUT-1:0]         q_sign
);

  localparam int unsigned WORDS = OUT / IN;

  function automatic logic [W-2:0] magnitude(input logic [W-1:0] x);
    logic [W-1:0] neg;
    if (!x[W-1]) return x[W-2:0];
    neg = -x;
    if (neg[W-1]) return '1;            // most negative code saturates
    return neg[W-2:0];
  endfunction

  logic [OUT-1:0][W-1:0] i_buf, q_buf;
  localparam int unsigned CW = $clog2(WORDS+1);
  localparam logic [CW-1:0] LAST_WORD = CW'(WORDS-1);
  logic [CW-1:0] wcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_buf <= '0;
      q_buf <= '0;
      wcnt  <= '0;
    end else if (in_valid) begin
      i_buf[wcnt*IN +: IN] <= i_s;
      q_buf[wcnt*IN +: IN] <= q_s;
      wcnt <= (wcnt == LAST_WORD) ? '0 : wcnt + 1'b1;
    end
  end

  // The block is complete when the last word of it arrives.
  logic [OUT-1:0][W-1:0] i_blk, q_blk;
  always_comb begin
    i_blk = i_buf;
    q_blk = q_buf;
    i_blk[(WORDS-1)*IN +: IN] = i_s;
    q_blk[(WORDS-1)*IN +: IN] = q_s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk_valid <= 1'b0;
      i_mag <= '0; i_sign <= '0;
      q_mag <= '0; q_sign <= '0;
    end else begin
      blk_valid <= in_valid && (wcnt == LAST_WORD);
      if (in_valid && (wcnt == LAST_WORD)) begin
        for (int k = 0; k < OUT; k++) begin
          i_mag[k]  <= magnitude(i_blk[k]);
          i_sign[k] <= i_blk[k][W-1];
          q_mag[k]  <= magnitude(q_blk[k]);
          q_sign[k] <= q_blk[k][W-1];
        end
      end
    end
  end

endmodule
