// phase_capture_ctrl: controller for phase measurement and the 128-phase
// latch.
//
// While the data-valid trigger (the synchronised video threshold) is high,
// each block of eight phases is written into slot 8k..8k+7 of a capture
// array. When the sixteenth block of a window arrives, the 128 phases are
// copied into the latch that feeds the phase estimators and win_valid
// pulses for one cycle; capture continues with the next window as long as
// the trigger stays high, so one window is delivered per 128 samples.
// If the trigger drops before a window is complete, the partial window is
// dropped and win_abort pulses. A window starts only at a block boundary
// with the trigger high.
//
// The document gives the function (gather groups of eight phases, latch 128
// phases, one update per 128 samples). The trigger gating and the handling of
// a trigger that drops mid-window are this design's choices.
//
// Timing: the latch and win_valid are updated in the cycle after the
// phases_valid of the window's last block.
module phase_capture_ctrl
  import difm_pkg::*;
#(
  parameter int unsigned P = BLOCK,
  parameter int unsigned N = WINDOW
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     trig,
  input  logic                     phases_valid,
  input  logic [P-1:0][PHASE_W-1:0] phases,
  output logic [N-1:0][PHASE_W-1:0] latch,
  output logic                     win_valid,
  output logic                     win_abort
);

  localparam int unsigned NBLK = N / P;

  logic [N-1:0][PHASE_W-1:0] capture;
  logic [$clog2(NBLK)-1:0]   blk;
  logic                      active;   // a window is partly captured

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      capture   <= '0;
      latch     <= '0;
      blk       <= '0;
      active    <= 1'b0;
      win_valid <= 1'b0;
      win_abort <= 1'b0;
    end else begin
      win_valid <= 1'b0;
      win_abort <= 1'b0;
      if (!trig) begin
        if (active) win_abort <= 1'b1;
        active <= 1'b0;
        blk    <= '0;
      end else if (phases_valid) begin
        capture[blk*P +: P] <= phases;
        if (blk == ($clog2(NBLK))'(NBLK-1)) begin
          latch <= capture;
          latch[blk*P +: P] <= phases;
          win_valid <= 1'b1;
          blk    <= '0;
          active <= 1'b0;
        end else begin
          blk    <= blk + 1'b1;
          active <= 1'b1;
        end
      end
    end
  end

endmodule
