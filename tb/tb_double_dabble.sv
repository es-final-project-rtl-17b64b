// tb_double_dabble: converts every value 0..1023 and checks the three
// decimal digits (modulo 1000) against integer division, and the latency
// of BIN_W + 1 clocks from start to done.
module tb_double_dabble;
  localparam int unsigned BIN_W = 10, DIGITS = 3;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [BIN_W-1:0] bin = '0;
  logic [4*DIGITS-1:0] bcd;
  int checks = 0, failures = 0;

  double_dabble #(.BIN_W(BIN_W), .DIGITS(DIGITS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    int v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (v = 0; v < 1024; v++) begin
      bin = BIN_W'(v); start = 1;
      @(negedge clk);
      start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (bcd !== {4'((v / 100) % 10), 4'((v / 10) % 10), 4'(v % 10)}) begin
        failures++;
        $display("FAIL %0d -> %h", v, bcd);
      end
      checks++;
      if (cyc != BIN_W + 1) begin
        failures++;
        $display("FAIL latency %0d for %0d", cyc, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
