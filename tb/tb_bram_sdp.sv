// tb_bram_sdp: self-checking test of the simple dual-port RAM.
// Writes random words to every address, reads them back and checks the
// one-clock read latency, read-during-write (old data) and reads beyond
// DEPTH (zero).
module tb_bram_sdp;
  localparam int unsigned DEPTH = 100, WIDTH = 24, AW = 7;
  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  bram_sdp #(.DEPTH(DEPTH), .WIDTH(WIDTH), .ADDR_W(AW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic [WIDTH-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; wr_addr = AW'(a); wr_data = WIDTH'($urandom); model[a] = wr_data;
      @(negedge clk);
    end
    we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      re = 1; rd_addr = AW'(a);
      @(negedge clk);
      check(rd_data, model[a], $sformatf("read %0d", a));
    end
    // data must not change while re is low
    re = 0; rd_addr = 7'd3;
    @(negedge clk);
    check(rd_data, model[DEPTH-1], "hold when re=0");
    // read during write returns old content
    re = 1; we = 1; rd_addr = 7'd10; wr_addr = 7'd10; wr_data = ~model[10];
    @(negedge clk);
    check(rd_data, model[10], "read during write");
    model[10] = ~model[10];
    we = 0;
    @(negedge clk);
    check(rd_data, model[10], "new data after write");
    // out of range
    rd_addr = 7'd120;
    @(negedge clk);
    check(rd_data, '0, "out of range read");
    // out-of-range write is dropped
    we = 1; wr_addr = 7'd120; wr_data = '1;
    @(negedge clk);
    we = 0; rd_addr = 7'd20;
    @(negedge clk);
    check(rd_data, model[20], "out-of-range write ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
