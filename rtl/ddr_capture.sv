// ddr_capture: double-data-rate input registers for one ADC channel pair.
//
// Each channel (I and Q) arrives on two lanes, the direct lane and the
// delayed lane (I/Id, Q/Qd), each SAMPLE_W bits wide, clocked at 625/4 MHz
// with a new word on both clock edges. A lane word is captured on the rising
// edge and on the falling edge; the falling-edge word is re-timed to the next
// rising edge, so that every rising edge presents the four samples of one
// clock period per channel (four per channel, eight in all, as the document
// describes for its four DDR registers).
//
// Sample order inside a clock period is this design's choice: rising-edge
// word of the direct lane, rising-edge word of the delayed lane, then the
// falling-edge words in the same lane order (s0..s3, oldest first).
//
// Timing: the four samples captured around rising edge k (rise at k-1,
// fall between k-1 and k) appear on i_s/q_s after rising edge k.
module ddr_capture
  import difm_pkg::*;
#(
  parameter int unsigned W     = SAMPLE_W,
  parameter int unsigned LANES = DDR_LANES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [LANES-1:0][W-1:0] i_lane,   // [0]=I, [1]=Id
  input  logic [LANES-1:0][W-1:0] q_lane,   // [0]=Q, [1]=Qd
  output logic [2*LANES-1:0][W-1:0] i_s,    // samples, index 0 oldest
  output logic [2*LANES-1:0][W-1:0] q_s,
  output logic                 valid
);

  logic [LANES-1:0][W-1:0] i_rise, q_rise, i_fall, q_fall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_rise <= '0;
      q_rise <= '0;
    end else begin
      i_rise <= i_lane;
      q_rise <= q_lane;
    end
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_fall <= '0;
      q_fall <= '0;
    end else begin
      i_fall <= i_lane;
      q_fall <= q_lane;
    end
  end

  // Same-edge output register: rise word first, then the fall word.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_s   <= '0;
      q_s   <= '0;
      valid <= 1'b0;
    end else begin
      i_s   <= {i_fall, i_rise};
      q_s   <= {q_fall, q_rise};
      valid <= 1'b1;
    end
  end

endmodule
