// tb_avalon_slave: drives Avalon-MM reads and writes and checks the memory
// write forwarding per region, the start pulses of the control register,
// the score and capture-enable registers, the class latch and status bits
// and the one-clock read latency.
module tb_avalon_slave;
  import bjc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [AV_ADDR_W-1:0] address = '0;
  logic write = 0, read = 0;
  logic [31:0] writedata = '0, readdata;
  logic mem_we;
  region_e mem_region;
  logic [AV_OFS_W-1:0] mem_ofs;
  logic [31:0] mem_wdata;
  logic cnn_start, cnn_busy = 0, cnn_done = 0;
  class_t cnn_class = '0;
  logic cam_cfg_start, cam_cfg_busy = 0, cap_enable, frame_ok = 0;
  logic [15:0] frame_count = '0;
  logic signed [15:0] score;
  logic [23:0] disp_buf = 24'h123456;
  int checks = 0, failures = 0;
  int n_start = 0, n_cfg = 0;

  avalon_slave dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin n_start += cnn_start; n_cfg += cam_cfg_start; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [AV_ADDR_W-1:0] adr(input region_e r, input int ofs);
    return {r, AV_OFS_W'(ofs)};
  endfunction

  task automatic wr(input logic [AV_ADDR_W-1:0] a, input logic [31:0] d);
    address = a; writedata = d; write = 1;
    #1;
    @(negedge clk);
    write = 0;
  endtask

  task automatic rd(input logic [AV_ADDR_W-1:0] a, output logic [31:0] d);
    address = a; read = 1;
    @(negedge clk);
    read = 0;
    d = readdata;   // valid one clock after read
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // memory regions are forwarded combinationally
    for (int r = 0; r < 4; r++) begin
      address = adr(region_e'(r), 1000 + r); writedata = 32'hA000_0000 + r; write = 1;
      #1;
      check(mem_we && mem_region == region_e'(r) && mem_ofs == AV_OFS_W'(1000 + r) &&
            mem_wdata == 32'hA000_0000 + r, $sformatf("forward region %0d", r));
      @(negedge clk);
    end
    write = 0;
    #1 check(!mem_we, "no forward without write");
    address = adr(R_CTRL, 3); write = 1;
    #1 check(!mem_we, "control writes not forwarded");
    write = 0;
    @(negedge clk);
    // control: start pulses
    wr(adr(R_CTRL, 0), 32'h1);
    @(negedge clk);
    check(n_start == 1 && n_cfg == 0, $sformatf("cnn start pulse once %0d %0d", n_start, n_cfg));
    wr(adr(R_CTRL, 0), 32'h2);
    @(negedge clk);
    check(n_start == 1 && n_cfg == 1, "camera config start pulse once");
    // score
    wr(adr(R_CTRL, 3), 32'hFFFF_FFF9);
    check(score == -16'sd7, "score written");
    rd(adr(R_CTRL, 3), d);
    check(d == 32'hFFFF_FFF9, $sformatf("score read back %h", d));
    // capture enable
    wr(adr(R_CTRL, 4), 32'h1);
    check(cap_enable, "capture enable set");
    rd(adr(R_CTRL, 4), d);
    check(d == 32'h1, "camctl read");
    // class latch and status
    cnn_class = 6'd37; cnn_done = 1;
    @(negedge clk);
    cnn_done = 0; cnn_class = 6'd5;
    rd(adr(R_CTRL, 2), d);
    check(d == 37, $sformatf("class read %0d", d));
    cnn_busy = 1; cam_cfg_busy = 1; frame_ok = 1;
    rd(adr(R_CTRL, 1), d);
    check(d == 32'hF, $sformatf("status %h", d));
    wr(adr(R_CTRL, 0), 32'h1);     // new start clears class valid
    cnn_busy = 0; cam_cfg_busy = 0; frame_ok = 0;
    rd(adr(R_CTRL, 1), d);
    check(d == 32'h0, $sformatf("status after start %h", d));
    frame_count = 16'd9;
    rd(adr(R_CTRL, 5), d);
    check(d == 9, "frames read");
    rd(adr(R_CTRL, 6), d);
    check(d == 32'h123456, "display buffer read");
    rd(adr(R_IMAGE, 5), d);
    check(d == 0, "memory region reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
