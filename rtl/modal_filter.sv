// modal_filter: phase estimator for one sample lag (T, 4T or 16T).
//
// From a latched window of N phases (whole degrees) it forms the N-LAG phase
// differences d = ph[n+LAG] - ph[n], made positive by adding 360 degrees
// (one turn) where needed, sorts them into NBINS equal groups of 360/NBINS
// degrees, picks the group holding the most differences (the lowest group
// number on a tie) and outputs the mean difference of that group as the
// estimate. Differences that fall outside the dominant group, such as those
// of noisy or invalid samples, are thereby discarded.
//
// The difference with a one-turn offset, 16 groups, the most populated group
// and its mean follow the document. The hardware organisation is this
// design's choice: a histogram stage handles P differences per cycle and
// takes N/P cycles; a second stage picks the group and divides its sum by
// its count with a restoring divider (one quotient bit per cycle). The two
// stages overlap, so a new window may start every N/P + 1 cycles once the
// divider (DVD_W + 2 cycles) has room; the top starts one every 2*N/P cycles.
// The estimate is rounded to 1/2^FRAC_W degree (12 bits: 9.3 fixed point).
//
// Interface: start pulses once with the window held stable on phases for
// the following N/P cycles. est_valid pulses with est, the size of the
// chosen group (est_count) and its number (est_group).
// Timing: est_valid comes N/P + DVD_W + 3 cycles after start.
module modal_filter
  import difm_pkg::*;
#(
  parameter int unsigned LAG   = 1,
  parameter int unsigned N     = WINDOW,
  parameter int unsigned P     = BLOCK,
  parameter int unsigned NB    = NBINS,
  parameter int unsigned FRAC  = FRAC_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [N-1:0][PHASE_W-1:0] phases,
  output logic                      est_valid,
  output logic [PHASE_W+FRAC-1:0]   est,
  output logic [$clog2(N+1)-1:0]    est_count,
  output logic [$clog2(NB)-1:0]     est_group
);

  localparam int unsigned STEPS = N / P;
  localparam int unsigned CNT_W = $clog2(N + 1);
  localparam int unsigned SUM_W = $clog2(N * 360);
  localparam int unsigned GRP_W = $clog2(NB);
  localparam int unsigned DVD_W = SUM_W + FRAC + 1;
  localparam int unsigned IDX_W = $clog2(N);

  // Group of a difference: floor(d * NB / 360).
  function automatic logic [GRP_W-1:0] group_of(input logic [PHASE_W-1:0] d);
    logic [GRP_W-1:0] g;
    g = '0;
    for (int t = 1; t < NB; t++)
      if (32'(d) * NB >= 32'(t) * 360) g = GRP_W'(t);
    return g;
  endfunction

  // ---------------- histogram stage ----------------
  logic                       a_busy;
  logic [$clog2(STEPS)-1:0]   step;
  logic [NB-1:0][CNT_W-1:0]   cnt, cnt_nx;
  logic [NB-1:0][SUM_W-1:0]   sum, sum_nx;

  always_comb begin
    cnt_nx = cnt;
    sum_nx = sum;
    for (int k = 0; k < P; k++) begin
      automatic int unsigned n = 32'(step) * P + k;
      automatic logic [PHASE_W:0] d;
      automatic logic [GRP_W-1:0] g;
      if (n + LAG < N) begin
        d = {1'b0, phases[IDX_W'(n + LAG)]} + (PHASE_W+1)'(360) - {1'b0, phases[IDX_W'(n)]};
        if (d >= (PHASE_W+1)'(360)) d = d - (PHASE_W+1)'(360);
        g = group_of(d[PHASE_W-1:0]);
        cnt_nx[g] = cnt_nx[g] + 1'b1;
        sum_nx[g] = sum_nx[g] + SUM_W'(d);
      end
    end
  end

  logic                     b_go;
  logic [NB-1:0][CNT_W-1:0] b_cnt;
  logic [NB-1:0][SUM_W-1:0] b_sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_busy <= 1'b0;
      step   <= '0;
      cnt    <= '0;
      sum    <= '0;
      b_go   <= 1'b0;
      b_cnt  <= '0;
      b_sum  <= '0;
    end else begin
      b_go <= 1'b0;
      if (start) begin
        a_busy <= 1'b1;
        step   <= '0;
        cnt    <= '0;
        sum    <= '0;
      end else if (a_busy) begin
        cnt  <= cnt_nx;
        sum  <= sum_nx;
        step <= step + 1'b1;
        if (step == ($clog2(STEPS))'(STEPS-1)) begin
          a_busy <= 1'b0;
          b_go   <= 1'b1;
          b_cnt  <= cnt_nx;
          b_sum  <= sum_nx;
        end
      end
    end
  end

  // ---------------- selection and division stage ----------------
  logic [GRP_W-1:0] sel;
  always_comb begin
    sel = '0;
    for (int g = 1; g < NB; g++)
      if (b_cnt[g] > b_cnt[sel]) sel = GRP_W'(g);
  end

  logic                     b_busy;
  logic [$clog2(DVD_W+1)-1:0] bits_left;
  logic [DVD_W-1:0]         dvd;      // dividend, shifted out MSB first
  logic [PHASE_W+FRAC-1:0]  quo;      // upper quotient bits are always 0
  logic [CNT_W-1:0]         rem;
  logic [CNT_W-1:0]         dvs;
  logic [GRP_W-1:0]         grp;
  logic [CNT_W:0]           rem_sh;

  assign rem_sh = {rem, dvd[DVD_W-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_busy    <= 1'b0;
      bits_left <= '0;
      dvd       <= '0;
      quo       <= '0;
      rem       <= '0;
      dvs       <= '0;
      grp       <= '0;
      est_valid <= 1'b0;
      est       <= '0;
      est_count <= '0;
      est_group <= '0;
    end else begin
      est_valid <= 1'b0;
      if (b_go) begin
        b_busy    <= 1'b1;
        bits_left <= ($clog2(DVD_W+1))'(DVD_W);
        // round to nearest: (sum * 2^FRAC + count/2) / count
        dvd <= (DVD_W'(b_sum[sel]) << FRAC) + DVD_W'(b_cnt[sel] >> 1);
        dvs <= b_cnt[sel];
        grp <= sel;
        quo <= '0;
        rem <= '0;
      end else if (b_busy) begin
        if (bits_left != 0) begin
          dvd <= dvd << 1;
          if (rem_sh >= {1'b0, dvs}) begin
            rem <= CNT_W'(rem_sh - {1'b0, dvs});
            quo <= {quo[PHASE_W+FRAC-2:0], 1'b1};
          end else begin
            rem <= CNT_W'(rem_sh);
            quo <= {quo[PHASE_W+FRAC-2:0], 1'b0};
          end
          bits_left <= bits_left - 1'b1;
        end else begin
          b_busy    <= 1'b0;
          est_valid <= 1'b1;
          est       <= quo;
          est_count <= dvs;
          est_group <= grp;
        end
      end
    end
  end

  // A new window must not overwrite one still being counted or divided.
  a_start_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !a_busy);
  a_handoff_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    b_go |-> !b_busy);

endmodule
