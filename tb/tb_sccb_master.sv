// tb_sccb_master: sends three register writes and decodes the SCL/SDA
// waveform with sccb_monitor: device ID, register, data, released ninth
// bits, start/stop framing, and the transaction length of 4*29 quarter
// periods.
module tb_sccb_master;
  localparam int unsigned CLK_HZ = 400, SCL_HZ = 10;   // 10 clocks per quarter bit
  localparam int unsigned QDIV = CLK_HZ / (4 * SCL_HZ);
  logic clk = 0, rst_n = 0, start = 0, busy, done, scl, sda_oe;
  logic [7:0] dev_id = '0, reg_addr = '0, data = '0;
  int checks = 0, failures = 0;

  sccb_master #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ)) dut (.*);
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
    logic [7:0] d [3], r [3], v [3];
    d = '{8'h42, 8'h42, 8'hA5}; r = '{8'h12, 8'h3E, 8'h5A}; v = '{8'h04, 8'h14, 8'hFF};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(scl && !sda_oe, "bus idle high");
    for (int i = 0; i < 3; i++) begin
      int cyc;
      dev_id = d[i]; reg_addr = r[i]; data = v[i]; start = 1;
      @(negedge clk);
      start = 0; cyc = 1;
      dev_id = '0; reg_addr = '0; data = '0;   // must have been captured
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc >= 4 * 29 * QDIV && cyc <= 4 * 29 * QDIV + 4, $sformatf("duration %0d", cyc));
      repeat (5) @(negedge clk);
      check(mon.ntrans == i + 1, $sformatf("transaction %0d seen", i));
      check(mon.dev[i] == d[i], $sformatf("dev id %h", mon.dev[i]));
      check(mon.regs[i] == r[i], $sformatf("register %h", mon.regs[i]));
      check(mon.vals[i] == v[i], $sformatf("value %h", mon.vals[i]));
      check(mon.ninth[i] == 3'b111, "ninth bits released");
      check(scl && !sda_oe && !busy, "bus idle after stop");
    end
    check(mon.nbad == 0, "no malformed transaction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
