// pulse_width_meter_tb: drives the asynchronous comparator input with pulses
// of random length (1 to 400 cycles, some beyond a reduced counter's range,
// changing between clock edges) and random gaps, and checks dv (the input
// two cycles late) and that each pulse is reported once with its length in
// clock cycles, saturating at the counter's maximum.
`timescale 1ns/1ps
module pulse_width_meter_tb;

  localparam int PW_W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic thr_in = 1'b0;
  logic dv, pw_valid;
  logic [PW_W-1:0] pw_count;
  int checks = 0, failures = 0, pulses = 0, saturated = 0;

  pulse_width_meter #(.PW_W(PW_W)) dut (.clk, .rst_n, .thr_in, .dv, .pw_valid, .pw_count);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lenq[$];
  logic [2:0] hist = '0;

  always @(posedge clk) begin
    hist = {hist[1:0], thr_in};
    #1;
    if (rst_n) begin
      checks++;
      if (dv != hist[1]) failures++;
    end
    if (pw_valid) begin
      int l;
      pulses++;
      checks++;
      l = lenq.pop_front();
      if (l > 255) begin l = 255; saturated++; end
      if (int'(pw_count) != l) begin
        failures++;
        $display("width %0d expected %0d", pw_count, l);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      int len;
      len = (n % 10 == 0) ? $urandom_range(256, 400) : $urandom_range(1, 200);
      repeat ($urandom_range(3, 20)) @(negedge clk);
      thr_in = 1'b1;
      lenq.push_back(len);
      repeat (len) @(negedge clk);
      thr_in = 1'b0;
    end
    repeat (10) @(posedge clk);
    checks += 2;
    if (lenq.size() != 0) failures++;
    if (pulses != 300 || saturated == 0) failures++;
    $display("pulses=%0d saturated=%0d", pulses, saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
