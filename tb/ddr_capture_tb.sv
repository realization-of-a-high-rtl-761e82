// ddr_capture_tb: drives the direct and delayed lanes of I and Q with a
// numbered sample stream, a new word before every clock edge, and checks
// that each rising edge presents the four samples of the previous clock
// period in time order (rise word, then fall word), one clock later.
`timescale 1ns/1ps
module ddr_capture_tb;
  import difm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0][6:0] i_lane, q_lane;
  logic [3:0][6:0] i_s, q_s;
  logic valid;
  int checks = 0, failures = 0;

  ddr_capture dut (.clk, .rst_n, .i_lane, .q_lane, .i_s, .q_s, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [6:0] smp(int n, int ch);
    return 7'((n * 3 + ch * 37 + (n >> 4)) & 7'h7f);
  endfunction

  task automatic set_word(int first);   // lanes carry samples first, first+1
    i_lane[0] = smp(first, 0);  i_lane[1] = smp(first + 1, 0);
    q_lane[0] = smp(first, 1);  q_lane[1] = smp(first + 1, 1);
  endtask

  initial begin
    set_word(0);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      @(posedge clk);            // rise word A_k (samples 4k, 4k+1) captured
      #1;
      if (k >= 1) begin
        for (int j = 0; j < 4; j++) begin
          checks += 2;
          if (i_s[j] !== smp(4 * (k - 1) + j, 0)) begin
            failures++;
            if (failures < 10) $display("period %0d I[%0d]=%0d expected %0d", k - 1, j, i_s[j], smp(4*(k-1)+j, 0));
          end
          if (q_s[j] !== smp(4 * (k - 1) + j, 1)) failures++;
        end
        checks++;
        if (!valid) failures++;
      end
      #1 set_word(4 * k + 2);    // fall word B_k
      @(negedge clk);
      #2 set_word(4 * (k + 1));  // next rise word
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
