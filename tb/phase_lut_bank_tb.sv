// phase_lut_bank_tb: one shared table load (round(atan2(|Q|,|I|)) degrees
// at address {|I|,|Q|}), then back-to-back blocks of eight random signed
// I/Q pairs; every set's phase is compared with the angle of its pair
// computed with real arithmetic (within one degree) two cycles after
// blk_valid.
`timescale 1ns/1ps
module phase_lut_bank_tb;
  import difm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0;
  logic [11:0] wr_addr;
  logic [6:0] wr_data;
  logic blk_valid = 1'b0;
  logic [7:0][5:0] mag_i, mag_q;
  logic [7:0] sign_i, sign_q;
  logic [7:0][8:0] phases;
  logic phases_valid;
  int checks = 0, failures = 0;

  localparam real PI = 3.14159265358979323846;

  phase_lut_bank dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .blk_valid,
                      .mag_i, .sign_i, .mag_q, .sign_q, .phases, .phases_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int true_deg(int i, int q);
    real d;
    if (i == 0 && q == 0) return 0;
    d = $atan2(real'(q), real'(i)) * 180.0 / PI;
    if (d < 0) d += 360.0;
    return int'($floor(d + 0.5)) % 360;
  endfunction

  typedef logic [7:0][8:0] blk_t;
  blk_t exp_q[$];
  int sent_cyc[$];
  int cyc = 0;

  always @(posedge clk) begin
    cyc++;
    #1;
    checks++;
    if (phases_valid !== (sent_cyc.size() != 0 && cyc - sent_cyc[0] == 2)) begin
      failures++;
      if (failures < 5) $display("phases_valid=%0d at cyc %0d, front %0d", phases_valid, cyc, sent_cyc.size() ? sent_cyc[0] : -1);
    end
    if (phases_valid && exp_q.size() != 0) begin
      blk_t e;
      e = exp_q.pop_front();
      void'(sent_cyc.pop_front());
      for (int s = 0; s < 8; s++) begin
        int d;
        checks++;
        d = int'(phases[s]) - int'(e[s]);
        if (d > 180) d -= 360;
        if (d < -180) d += 360;
        if (d > 1 || d < -1) begin
          failures++;
          if (failures < 10) $display("set %0d phase %0d expected %0d", s, phases[s], e[s]);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk);
      wr_en   = 1'b1;
      wr_addr = 12'(a);
      wr_data = 7'(true_deg(a >> 6, a & 63));
    end
    @(negedge clk) wr_en = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      blk_t e;
      @(negedge clk);
      blk_valid = (n % 3 != 2);
      if (blk_valid) begin
        for (int s = 0; s < 8; s++) begin
          int i, q;
          i = $urandom_range(0, 126) - 63;
          q = $urandom_range(0, 126) - 63;
          mag_i[s] = 6'(i < 0 ? -i : i);  sign_i[s] = (i < 0);
          mag_q[s] = 6'(q < 0 ? -q : q);  sign_q[s] = (q < 0);
          e[s] = 9'(true_deg(i, q));
        end
        exp_q.push_back(e);
        sent_cyc.push_back(cyc);
      end
    end
    @(negedge clk) blk_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
