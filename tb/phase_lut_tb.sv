// phase_lut_tb: loads the 4K x 7 table with the first-quadrant angle
// round(atan2(|Q|, |I|)) in degrees through the write port, then reads
// random sign-magnitude pairs and compares the 0..359 phase with the angle
// of the signed pair computed with real arithmetic (within one degree for
// rounding), plus exact checks on the axes and on each quadrant, and checks
// the two-cycle read latency.
`timescale 1ns/1ps
module phase_lut_tb;
  import difm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0;
  logic [11:0] wr_addr;
  logic [6:0] wr_data;
  logic rd_en = 1'b0;
  logic [5:0] mag_i, mag_q;
  logic sign_i, sign_q;
  logic [8:0] phase;
  logic phase_valid;
  int checks = 0, failures = 0;

  localparam real PI = 3.14159265358979323846;

  phase_lut dut (.wr_clk(clk), .wr_en, .wr_addr, .wr_data, .rd_clk(clk), .rst_n,
                 .rd_en, .mag_i, .mag_q, .sign_i, .sign_q, .phase, .phase_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int quad_deg(int mi, int mq);
    if (mi == 0 && mq == 0) return 0;
    return int'($floor($atan2(real'(mq), real'(mi)) * 180.0 / PI + 0.5));
  endfunction

  function automatic int true_deg(int i, int q);
    real d;
    if (i == 0 && q == 0) return 0;
    d = $atan2(real'(q), real'(i)) * 180.0 / PI;
    if (d < 0) d += 360.0;
    return int'($floor(d + 0.5)) % 360;
  endfunction

  // expected phases of issued reads, in order
  int exp_q[$];
  int lat_cnt[$];
  int cyc = 0;

  always @(posedge clk) begin
    cyc++;
    #1;
    if (phase_valid) begin
      int e, d, issued;
      e = exp_q.pop_front();
      issued = lat_cnt.pop_front();
      checks += 2;
      d = int'(phase) - e;
      if (d > 180) d -= 360;
      if (d < -180) d += 360;
      if (d > 1 || d < -1) begin
        failures++;
        if (failures < 10) $display("phase %0d expected %0d", phase, e);
      end
      if (cyc - issued != 2) begin
        failures++;
        $display("latency %0d", cyc - issued);
      end
    end
  end

  task automatic read(int i, int q);
    @(negedge clk);
    rd_en  = 1'b1;
    mag_i  = 6'(i < 0 ? -i : i);
    mag_q  = 6'(q < 0 ? -q : q);
    sign_i = (i < 0);
    sign_q = (q < 0);
    exp_q.push_back(true_deg(i, q));
    lat_cnt.push_back(cyc);
    @(negedge clk);
    rd_en = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk);
      wr_en   = 1'b1;
      wr_addr = 12'(a);
      wr_data = 7'(quad_deg(a >> 6, a & 63));
    end
    @(negedge clk) wr_en = 1'b0;
    // axes and quadrants
    read(40, 0);  read(0, 40);  read(-40, 0);  read(0, -40);
    read(30, 30); read(-30, 30); read(-30, -30); read(30, -30);
    read(63, 1);  read(63, -1);
    for (int n = 0; n < 3000; n++) begin
      int i, q;
      i = $urandom_range(0, 126) - 63;
      q = $urandom_range(0, 126) - 63;
      read(i, q);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
