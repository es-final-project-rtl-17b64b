// tb_camera_config: starts the camera setup and checks, by decoding the
// SCCB bus, that COM7 (0x12) gets 0x04 and COM14 (0x3E) gets 0x14 at
// device ID 0x42, in that order, and that busy/done frame the writes.
module tb_camera_config;
  localparam int unsigned CLK_HZ = 400, SCL_HZ = 10;
  logic clk = 0, rst_n = 0, start = 0, busy, done, scl, sda_oe;
  int checks = 0, failures = 0;

  camera_config #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ)) dut (.*);
  sccb_monitor mon (.scl, .sda_oe);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, ndone;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy, "idle after reset");
    for (int run = 0; run < 2; run++) begin
      start = 1;
      @(negedge clk);
      start = 0; cyc = 0; ndone = 0;
      check(busy, "busy after start");
      while (busy) begin @(negedge clk); cyc++; ndone += done; end
      repeat (3) @(negedge clk);
      check(ndone == 1, "one done pulse");
      check(mon.ntrans == 2 * (run + 1), $sformatf("two writes, saw %0d", mon.ntrans));
      check(mon.dev[2*run] == 8'h42 && mon.dev[2*run+1] == 8'h42, "device id 0x42");
      check(mon.regs[2*run] == 8'h12 && mon.vals[2*run] == 8'h04, "COM7 = 0x04");
      check(mon.regs[2*run+1] == 8'h3E && mon.vals[2*run+1] == 8'h14, "COM14 = 0x14");
      check(cyc >= 2 * 4 * 29 * 10, "writes take their bit time");
    end
    check(mon.nbad == 0, "no malformed transaction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
