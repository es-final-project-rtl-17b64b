// tb_display_logic: applies a list of scores and checks the six buffer
// digits (play/wait letters, sign, decimal digits) and that a new score
// shows within 2*(BIN_W+3) clocks.
module tb_display_logic;
  import bjc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] score = '0;
  logic [23:0] disp_buf;
  logic updated;
  int checks = 0, failures = 0;

  display_logic #(.SCORE_W(16), .PLAY_MIN(1)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [23:0] expect_buf(input int s);
    logic [3:0] d [6];
    int m;
    logic play;
    play = s >= 1;
    d[0] = play ? 4'hA : 4'hD;
    d[1] = 4'hB;
    d[2] = play ? 4'hC : 4'hE;
    if (s < 0) begin
      m = (-s > 99) ? 99 : -s;
      d[3] = 4'hF;
    end else begin
      m = (s > 999) ? 999 : s;
      d[3] = 4'(m / 100);
    end
    d[4] = 4'((m / 10) % 10);
    d[5] = 4'(m % 10);
    return {d[5], d[4], d[3], d[2], d[1], d[0]};
  endfunction

  initial begin
    int scores [12] = '{0, 1, 5, 17, 120, -1, -3, -45, -150, 1234, 999, -99};
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (scores[i]) begin
      int n;
      score = 16'(scores[i]);
      n = 0;
      // wait until the buffer shows the new score; give up after the bound
      while (disp_buf !== expect_buf(scores[i]) && n < 2 * (10 + 3)) begin
        @(negedge clk); n++;
      end
      checks++;
      if (disp_buf !== expect_buf(scores[i])) begin
        failures++;
        $display("FAIL score %0d: buf %h expected %h", scores[i], disp_buf, expect_buf(scores[i]));
      end
      // it must stay there
      repeat (40) @(negedge clk);
      checks++;
      if (disp_buf !== expect_buf(scores[i])) begin
        failures++;
        $display("FAIL score %0d not stable: %h", scores[i], disp_buf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
