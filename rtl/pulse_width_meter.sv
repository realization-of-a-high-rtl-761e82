// pulse_width_meter: data-valid trigger and pulse width.
//
// The external comparator output (video channel against the DAC threshold)
// is asynchronous; two flip-flops bring it into the system clock as the
// data-valid trigger dv that gates phase capture. While dv is high a counter
// runs; when dv falls, the number of clock cycles it was high is presented on
// pw_count with a one-cycle pw_valid. The count saturates at all ones.
// One count is one 625/4 MHz cycle (6.4 ns).
//
// The document says the video channel generates the data-valid trigger and
// that this enables pulse width measurement; the synchroniser, the clock-cycle
// resolution and the saturation are this design's choices.
//
// Timing: dv follows thr_in after two clock cycles; pw_valid comes one cycle
// after dv falls.
module pulse_width_meter #(
  parameter int unsigned PW_W = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            thr_in,
  output logic            dv,
  output logic            pw_valid,
  output logic [PW_W-1:0] pw_count
);

  logic       meta;
  logic [PW_W-1:0] run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta     <= 1'b0;
      dv       <= 1'b0;
      run      <= '0;
      pw_valid <= 1'b0;
      pw_count <= '0;
    end else begin
      meta     <= thr_in;
      dv       <= meta;
      pw_valid <= 1'b0;
      if (dv) begin
        if (run != '1) run <= run + 1'b1;
      end else if (run != '0) begin
        pw_valid <= 1'b1;
        pw_count <= run;
        run      <= '0;
      end
    end
  end

endmodule
