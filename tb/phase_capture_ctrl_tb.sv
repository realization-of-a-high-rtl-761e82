// phase_capture_ctrl_tb: sends blocks of eight numbered phases every second
// cycle (the 625/8 MHz block rate) and moves the trigger: a long high
// period (several back-to-back windows), a short one that ends mid-window
// (must be dropped with win_abort) and a restart. Every latched window must
// hold the 128 phases of 16 consecutive blocks that started with the
// trigger high, and windows must follow each other every 32 cycles.
`timescale 1ns/1ps
module phase_capture_ctrl_tb;
  import difm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic trig = 1'b0, phases_valid = 1'b0;
  logic [7:0][8:0] phases;
  logic [127:0][8:0] latch;
  logic win_valid, win_abort;
  int checks = 0, failures = 0, windows = 0, aborts = 0;

  phase_capture_ctrl dut (.clk, .rst_n, .trig, .phases_valid, .phases,
                          .latch, .win_valid, .win_abort);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: blocks sent with the trigger high, counted per window.
  int blk_no = 0;            // running block number (phase value source)
  int run_start = -1;        // block number where the current window began
  int run_len = 0;
  int exp_first[$];          // first block number of each expected window
  int exp_abort = 0;
  int last_win = -1, cyc = 0;

  function automatic logic [8:0] ph(int b, int k);
    return 9'((b * 8 + k) % 360);
  endfunction

  always @(posedge clk) begin
    cyc++;
    #1;
    if (win_valid) begin
      int f;
      windows++;
      checks++;
      if (exp_first.size() == 0) begin
        failures++;
        $display("unexpected window");
      end else begin
        f = exp_first.pop_front();
        for (int n = 0; n < 128; n++) begin
          checks++;
          if (latch[n] != ph(f + n / 8, n % 8)) failures++;
        end
      end
      if (last_win >= 0 && cyc - last_win != 32 && cyc - last_win < 40) begin
        // back-to-back windows of one trigger period are 32 cycles apart
        failures++;
        $display("window spacing %0d", cyc - last_win);
      end
      last_win = cyc;
    end
    if (win_abort) aborts++;
  end

  task automatic send_blocks(int nblk, bit t);
    for (int b = 0; b < nblk; b++) begin
      @(negedge clk);
      trig = t;
      phases_valid = 1'b1;
      for (int k = 0; k < 8; k++) phases[k] = ph(blk_no, k);
      if (t) begin
        if (run_len == 0) run_start = blk_no;
        run_len++;
        if (run_len == 16) begin
          exp_first.push_back(run_start);
          run_len = 0;
        end
      end else begin
        if (run_len != 0) exp_abort++;
        run_len = 0;
      end
      blk_no++;
      @(negedge clk);
      phases_valid = 1'b0;
    end
  endtask

  initial begin
    phases = '0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    send_blocks(5, 1'b0);
    send_blocks(16 * 4, 1'b1);      // four back-to-back windows
    send_blocks(3, 1'b0);
    last_win = -1;
    send_blocks(10, 1'b1);          // too short: aborted
    send_blocks(2, 1'b0);
    last_win = -1;
    send_blocks(16 + 7, 1'b1);      // one window, then an aborted tail
    send_blocks(4, 1'b0);
    repeat (10) @(posedge clk);
    checks += 3;
    if (windows != 5) failures++;
    if (aborts != exp_abort || aborts != 2) failures++;
    if (exp_first.size() != 0) failures++;
    $display("windows=%0d aborts=%0d", windows, aborts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
