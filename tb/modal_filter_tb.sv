// modal_filter_tb: three estimators (lags 1, 4 and 16 samples) share a
// latched window, as in the full design. Windows are tones with phase noise
// and a few replaced ("invalid") samples, plus fully random windows that
// make group ties likely. A behavioural reference forms the differences,
// the 16-group histogram, the first most populated group and its rounded
// mean; estimate, group size and group number must match exactly, and the
// estimate must arrive N/P + DVD_W + 3 = 39 cycles after start. Windows are
// started every 32 cycles, the rate of the full design.
`timescale 1ns/1ps
module modal_filter_tb;
  import difm_pkg::*;

  localparam int N = 128;
  localparam int LATENCY = 39;
  localparam int LAGS[3] = '{1, 4, 16};

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [N-1:0][8:0] phases;
  logic [2:0] est_valid;
  logic [2:0][11:0] est;
  logic [2:0][7:0] est_count;
  logic [2:0][3:0] est_group;
  int checks = 0, failures = 0, rejected = 0, ties = 0;

  for (genvar f = 0; f < 3; f++) begin : g_dut
    modal_filter #(.LAG(LAGS[f])) dut (
      .clk, .rst_n, .start, .phases,
      .est_valid(est_valid[f]), .est(est[f]),
      .est_count(est_count[f]), .est_group(est_group[f]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results per filter, packed {est, count, group, start cycle}
  typedef struct packed {
    logic [11:0] est;
    logic [7:0]  cnt;
    logic [3:0]  grp;
    logic [31:0] cyc;
  } exp_t;
  exp_t expq[3][$];
  int cyc = 0;

  function automatic exp_t reference(logic [N-1:0][8:0] ph, int lag, int at);
    int cnt[16], sum[16], best, d, g;
    exp_t r;
    for (int b = 0; b < 16; b++) begin cnt[b] = 0; sum[b] = 0; end
    for (int n = 0; n + lag < N; n++) begin
      d = int'(ph[n + lag]) - int'(ph[n]);
      if (d < 0) d += 360;
      g = (d * 16) / 360;
      cnt[g]++;
      sum[g] += d;
    end
    best = 0;
    for (int b = 1; b < 16; b++) if (cnt[b] > cnt[best]) best = b;
    for (int b = 0; b < 16; b++) if (b != best && cnt[b] == cnt[best]) ties++;
    r.est = 12'(int'($floor(real'(sum[best]) * 8.0 / real'(cnt[best]) + 0.5)));
    r.cnt = 8'(cnt[best]);
    r.grp = 4'(best);
    r.cyc = 32'(at);
    return r;
  endfunction

  always @(posedge clk) begin
    cyc++;
    #1;
    for (int f = 0; f < 3; f++) begin
      if (est_valid[f]) begin
        exp_t e;
        checks += 4;
        if (expq[f].size() == 0) begin
          failures++;
          continue;
        end
        e = expq[f].pop_front();
        if (est[f] != e.est || est_count[f] != e.cnt || est_group[f] != e.grp) begin
          failures++;
          if (failures < 10)
            $display("lag %0d: est %0d cnt %0d grp %0d, expected %0d %0d %0d",
                     LAGS[f], est[f], est_count[f], est_group[f], e.est, e.cnt, e.grp);
        end
        if (cyc - int'(e.cyc) != LATENCY) begin
          failures++;
          if (failures < 10) $display("latency %0d", cyc - int'(e.cyc));
        end
        if (int'(est_count[f]) < N - LAGS[f]) rejected++;
      end
    end
  end

  task automatic make_window(int kind);
    real step, base, p;
    step = real'($urandom_range(0, 35999)) / 100.0;
    base = real'($urandom_range(0, 359));
    for (int n = 0; n < N; n++) begin
      if (kind == 0) begin
        p = base + step * n + real'($urandom_range(0, 6)) - 3.0;
        p = p - 360.0 * $floor(p / 360.0);
        phases[n] = 9'(int'($floor(p)) % 360);
        if ($urandom_range(0, 19) == 0) phases[n] = 9'($urandom_range(0, 359));
      end else begin
        phases[n] = 9'($urandom_range(0, 359));
      end
    end
  endtask

  initial begin
    phases = '0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int w = 0; w < 400; w++) begin
      @(negedge clk);
      make_window(w % 4 == 3);
      for (int f = 0; f < 3; f++) expq[f].push_back(reference(phases, LAGS[f], cyc));
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      repeat (30) @(negedge clk);
    end
    repeat (60) @(posedge clk);
    checks += 2;
    for (int f = 0; f < 3; f++) if (expq[f].size() != 0) failures++;
    if (rejected == 0 || ties == 0) failures++;
    $display("windows with rejected differences=%0d ties=%0d", rejected, ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
