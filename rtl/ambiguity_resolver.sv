// ambiguity_resolver: unwraps the lag-16T phase difference.
//
// The lag-T difference phi_T is unambiguous but coarse; phi_4T and phi_16T
// are four and sixteen times as sensitive to frequency but known only modulo
// one turn. The resolver works in two steps, each choosing the number of
// whole turns that brings the finer phase closest to four times the coarser
// unwrapped one:
//   u4  = phi_4T  + k*360,  k in 0..3,  closest to 4*phi_T      (mod 4 turns)
//   u16 = phi_16T + m*360,  m in 0..15, closest to 4*u4         (mod 16 turns)
// u16 (0 .. 16*360 degrees) is the unwrapped phase that addresses the
// external frequency table. Distances are taken around the circle of 4 (16)
// turns so that phases near the wrap point resolve correctly.
//
// The document gives the inputs and the output; the nearest-turn rule is
// this design's choice. All phases are in 1/2^FRAC_W degree units.
//
// Timing: out_valid and the results come two cycles after in_valid
// (one register per step).
module ambiguity_resolver
  import difm_pkg::*;
#(
  parameter int unsigned EW = EST_W,                 // estimate width
  parameter int unsigned TURN = FULL_TURN,           // 360 degrees in units
  parameter int unsigned UW = UNWRAP_W               // >= log2(16*TURN)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [EW-1:0] phi_t,
  input  logic [EW-1:0] phi_4t,
  input  logic [EW-1:0] phi_16t,
  output logic          out_valid,
  output logic [UW-1:0] phi4_unwrapped,
  output logic [UW-1:0] phi16_unwrapped
);

  // Nearest candidate ref ~ fine + j*TURN, j in 0..M-1, around a circle of
  // M turns. Returns the candidate.
  function automatic logic [UW-1:0] nearest(input int unsigned ref_v,
                                            input int unsigned fine,
                                            input int unsigned M);
    int unsigned best_j, best_e, circ, c, e;
    circ   = M * TURN;
    best_j = 0;
    best_e = circ;
    for (int unsigned j = 0; j < 16; j++) begin
      if (j < M) begin
        c = fine + j * TURN;
        e = (ref_v >= c) ? ref_v - c : c - ref_v;       // |ref - c|
        if (e > circ / 2) e = circ - e;               // around the circle
        if (e < best_e) begin
          best_e = e;
          best_j = j;
        end
      end
    end
    return UW'(fine + best_j * TURN);
  endfunction

  logic          v1;
  logic [EW-1:0] p16_d;
  logic [UW-1:0] u4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1              <= 1'b0;
      p16_d           <= '0;
      u4              <= '0;
      phi4_unwrapped  <= '0;
      out_valid       <= 1'b0;
      phi16_unwrapped <= '0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      if (in_valid) begin
        u4    <= nearest((4 * int'(phi_t)) % (4 * TURN), int'(phi_4t), 4);
        p16_d          <= phi_16t;
      end
      if (v1) begin
        phi4_unwrapped  <= u4;
        phi16_unwrapped <= nearest((4 * int'(u4)) % (16 * TURN), int'(p16_d), 16);
      end
    end
  end

endmodule
