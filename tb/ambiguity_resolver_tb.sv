// ambiguity_resolver_tb: draws a true unwrapped lag-16T phase U anywhere in
// 0 .. 16 turns (1/8 degree units, wrap points included), derives the three
// wrapped inputs phi_T = U/16, phi_4T = U/4 and phi_16T = U (each modulo one
// turn) with independent errors of up to +-20, +-40 and +-15 degrees (4 x 40 + 15 stays below half a turn), and
// checks that the outputs are U/4 and U with the phi_4T and phi_16T errors
// carried through unchanged (modulo 4 and 16 turns), two cycles after
// in_valid. Inputs arrive back to back.
`timescale 1ns/1ps
module ambiguity_resolver_tb;
  import difm_pkg::*;

  localparam int TURN = 2880;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [11:0] phi_t, phi_4t, phi_16t;
  logic out_valid;
  logic [15:0] phi4_unwrapped, phi16_unwrapped;
  int checks = 0, failures = 0, wraps = 0;

  ambiguity_resolver dut (.clk, .rst_n, .in_valid, .phi_t, .phi_4t, .phi_16t,
                          .out_valid, .phi4_unwrapped, .phi16_unwrapped);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wrap(int v, int m);
    v = v % m;
    return (v < 0) ? v + m : v;
  endfunction

  typedef struct packed { logic [15:0] u4; logic [15:0] u16; } exp_t;
  exp_t q[$];

  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      exp_t e;
      checks += 2;
      e = q.pop_front();
      if (phi4_unwrapped != e.u4) begin
        failures++;
        if (failures < 10) $display("u4 %0d expected %0d", phi4_unwrapped, e.u4);
      end
      if (phi16_unwrapped != e.u16) begin
        failures++;
        if (failures < 10) $display("u16 %0d expected %0d", phi16_unwrapped, e.u16);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      int u, e1, e4, e16;
      exp_t e;
      @(negedge clk);
      u = (n % 10 == 0) ? wrap($urandom_range(0, 800) - 400, 16 * TURN)
                        : $urandom_range(0, 16 * TURN - 1);
      if (n % 10 == 0) wraps++;
      e1  = $urandom_range(0, 320) - 160;
      e4  = $urandom_range(0, 640) - 320;
      e16 = $urandom_range(0, 240) - 120;
      phi_t   = 12'(wrap(u / 16 + e1, TURN));
      phi_4t  = 12'(wrap(u / 4 + e4, TURN));
      phi_16t = 12'(wrap(u + e16, TURN));
      e.u4  = 16'(wrap(u / 4 + e4, 4 * TURN));
      e.u16 = 16'(wrap(u + e16, 16 * TURN));
      q.push_back(e);
      in_valid = 1'b1;
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
