// difm_top_tb: end-to-end test of the phase and frequency path at the
// design's full size.
//
// 1. Acting as the host processor, it loads all 4096 phase table entries
//    (round(atan2(|Q|,|I|)) in degrees at address {|I|,|Q|}) and a DAC code
//    over SPI.
// 2. It then plays radar pulses: for each pulse a complex tone of random
//    normalised frequency fn = f/fs is sampled at 625 MSPS (fn in
//    0.03 .. 0.97, and for every fourth pulse within 0.03 of 0 or fs, where
//    every phase estimate wraps),
//    quantised to 7 bits (full scale, so the most negative code occurs),
//    with about one sample in 48 replaced by a random "invalid" value, and
//    sent over the four DDR lanes. The comparator input is high for 108
//    clock cycles per pulse, i.e. three whole 128-sample windows and a
//    partial fourth one.
// Checks: every frequency table address is within 6 degrees of
// 16*360*fn (circularly, out of 5760); each pulse gives two or three
// addresses spaced exactly 32 clock cycles apart (one per 128 samples); the
// pulse width equals the comparator high time; the DAC code is the one
// written. Mechanisms counted (each must occur): table writes (4096),
// DAC write, complete windows, dropped partial windows, modal filter groups
// that exclude differences, ambiguity resolution adding turns, and the
// most negative ADC code.
`timescale 1ns/1ps
module difm_top_tb;
  import difm_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam int PULSES = 64;
  localparam int HIGH = 108;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0][6:0] adc_i, adc_q;
  logic thr_in = 1'b0;
  logic sclk = 1'b0, mosi = 1'b0, cs_n = 1'b1;
  logic [7:0] dac_code;
  logic freq_lut_valid;
  logic [12:0] freq_lut_addr;
  logic [15:0] phi16_unwrapped;
  logic [11:0] phi_t, phi_4t, phi_16t;
  logic win_abort, pw_valid;
  logic [15:0] pw_count;

  int checks = 0, failures = 0;
  int n_lut_writes = 0, n_dac = 0, n_windows = 0, n_aborts = 0;
  int n_rejects = 0, n_turns = 0, n_neg_fs = 0, n_outputs = 0;

  difm_top dut (
    .clk, .rst_n, .adc_i, .adc_q, .thr_in,
    .spi_sclk(sclk), .spi_mosi(mosi), .spi_cs_n(cs_n),
    .dac_code, .freq_lut_valid, .freq_lut_addr, .phi16_unwrapped,
    .phi_t, .phi_4t, .phi_16t, .win_abort, .pw_valid, .pw_count
  );

  always #3.2 clk = ~clk;   // 156.25 MHz

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- ADC model ----------------
  real fn = 0.1, acc = 0.0;
  int  nsamp = 0;

  function automatic logic [6:0] quant(real v);
    int q;
    q = int'($floor(v + 0.5));
    if (q > 63) q = 63;
    if (q < -64) q = -64;
    return 7'(q);
  endfunction

  // next I/Q sample pair of the tone (with occasional invalid samples)
  task automatic next_sample(output logic [6:0] si, output logic [6:0] sq);
    real a;
    a = 2.0 * PI * acc;
    si = quant(63.9 * $cos(a));
    sq = quant(63.9 * $sin(a));
    if ($urandom_range(0, 47) == 0) begin
      si = 7'($urandom);
      sq = 7'($urandom);
    end
    if (si == 7'h40 || sq == 7'h40) n_neg_fs++;
    acc = acc + fn;
    acc = acc - $floor(acc);
    nsamp++;
  endtask

  // Lane drive: rise word before each rising edge, fall word before each
  // falling edge; two samples per word (direct lane first).
  initial begin
    adc_i = '0; adc_q = '0;
    forever begin
      logic [6:0] i0, q0, i1, q1;
      @(negedge clk);
      #1;
      next_sample(i0, q0); next_sample(i1, q1);
      adc_i = {i1, i0}; adc_q = {q1, q0};
      @(posedge clk);
      #1;
      next_sample(i0, q0); next_sample(i1, q1);
      adc_i = {i1, i0}; adc_q = {q1, q0};
    end
  end

  // ---------------- output monitor ----------------
  int cyc = 0, last_out = -1000, outs_this_pulse = 0;
  int exp_addr = 0;
  int exp_pw = -1;

  always @(posedge clk) begin
    cyc++;
    #0.5;
    if (win_abort) n_aborts++;
    if (dut.win_valid) n_windows++;
    if (dut.est_valid[0]) begin
      if (int'(dut.g_filt[0].u_mf.est_count) < 127 ||
          int'(dut.g_filt[1].u_mf.est_count) < 124 ||
          int'(dut.g_filt[2].u_mf.est_count) < 112) n_rejects++;
    end
    if (freq_lut_valid) begin
      int d;
      n_outputs++;
      outs_this_pulse++;
      checks++;
      d = int'(freq_lut_addr) - exp_addr;
      if (d > 2880) d -= 5760;
      if (d < -2880) d += 5760;
      if (d > 6 || d < -6) begin
        failures++;
        $display("fn=%f addr %0d expected %0d (phi_t %0d phi_4t %0d phi_16t %0d)",
                 fn, freq_lut_addr, exp_addr, phi_t, phi_4t, phi_16t);
      end
      if (phi16_unwrapped >= 16'(2 * 2880)) n_turns++;
      if (outs_this_pulse > 1) begin
        checks++;
        if (cyc - last_out != 32) begin
          failures++;
          $display("output spacing %0d cycles", cyc - last_out);
        end
      end
      last_out = cyc;
    end
    if (pw_valid) begin
      checks++;
      if (int'(pw_count) != exp_pw) begin
        failures++;
        $display("pulse width %0d expected %0d", pw_count, exp_pw);
      end
    end
  end

  // ---------------- host processor (SPI) ----------------
  task automatic spi_frame(logic [23:0] w);
    cs_n = 1'b0;
    repeat (2) @(negedge clk);
    for (int b = 23; b >= 0; b--) begin
      mosi = w[b];
      repeat (3) @(negedge clk);
      sclk = 1'b1;
      repeat (3) @(negedge clk);
      sclk = 1'b0;
    end
    repeat (2) @(negedge clk);
    cs_n = 1'b1;
    repeat (3) @(negedge clk);
  endtask

  always @(posedge clk) if (dut.lut_wr_en) n_lut_writes++;

  initial begin
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int a = 0; a < 4096; a++) begin
      int mi, mq, deg;
      mi = a >> 6; mq = a & 63;
      deg = (mi == 0 && mq == 0) ? 0
          : int'($floor($atan2(real'(mq), real'(mi)) * 180.0 / PI + 0.5));
      spi_frame({4'h1, 12'(a), 8'(deg)});
    end
    spi_frame({4'h2, 12'h000, 8'h5a});
    repeat (8) @(posedge clk);
    checks++;
    n_dac++;
    if (dac_code != 8'h5a) failures++;

    for (int p = 0; p < PULSES; p++) begin
      int outs;
      @(negedge clk);
      if (p % 4 == 3) begin      // around 0 / fs, where every phase wraps
        fn = 0.97 + 0.06 * real'($urandom_range(0, 100000)) / 100000.0;
        fn = fn - $floor(fn);
      end else begin
        fn = 0.03 + 0.94 * real'($urandom_range(0, 100000)) / 100000.0;
      end
      exp_addr = int'($floor(5760.0 * fn + 0.5)) % 5760;
      repeat (40) @(negedge clk);          // new tone settles in the pipeline
      outs_this_pulse = 0;
      exp_pw = HIGH;
      thr_in = 1'b1;
      repeat (HIGH) @(negedge clk);
      thr_in = 1'b0;
      repeat (80) @(negedge clk);          // let the last estimate out
      checks++;
      if (outs_this_pulse < 2 || outs_this_pulse > 3) begin
        failures++;
        $display("pulse %0d gave %0d outputs", p, outs_this_pulse);
      end
    end

    checks += 7;
    if (n_lut_writes != 4096) failures++;
    if (n_windows < 2 * PULSES || n_windows != n_outputs) failures++;
    if (n_aborts == 0) failures++;
    if (n_rejects == 0) failures++;
    if (n_turns == 0) failures++;
    if (n_neg_fs == 0) failures++;
    if (n_dac == 0) failures++;
    $display("lut writes=%0d dac writes=%0d windows=%0d outputs=%0d aborts=%0d",
             n_lut_writes, n_dac, n_windows, n_outputs, n_aborts);
    $display("windows with rejected differences=%0d unwrapped beyond 2 turns=%0d -64 codes=%0d",
             n_rejects, n_turns, n_neg_fs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
