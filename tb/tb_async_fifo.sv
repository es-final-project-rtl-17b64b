// tb_async_fifo: checks the dual-clock FIFO between two unrelated clocks.
// A scoreboard queue records every word accepted on the write clock
// (wr_en while !full) and every word popped on the read clock must match
// the head of that queue. Three phases: a fast writer against a slow
// reader (full must assert and hold the writer off without loss), a slow
// writer against a fast reader (empty must assert between words), and a
// stopped reader (exactly DEPTH words fit, then full; after draining,
// empty and not full). Stimulus changes on falling edges; the checks
// sample on rising edges.
module tb_async_fifo;
  localparam int unsigned WIDTH = 10, DEPTH = 16;
  logic wr_clk = 0, rd_clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic [WIDTH-1:0] sb[$];
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_full_clks = 0, n_empty_clks = 0, n_mismatch = 0;
  realtime wr_half = 7.0, rd_half = 20.0;

  async_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .wr_clk, .wr_rst_n(rst_n), .wr_en, .wr_data, .full,
    .rd_clk, .rd_rst_n(rst_n), .rd_en, .rd_data, .empty);

  always #(wr_half) wr_clk = ~wr_clk;
  always #(rd_half) rd_clk = ~rd_clk;

  always @(posedge wr_clk) if (rst_n) begin
    if (full) n_full_clks++;
    if (wr_en && !full) begin sb.push_back(wr_data); n_wr++; end
  end

  always @(posedge rd_clk) if (rst_n) begin
    if (empty) n_empty_clks++;
    if (rd_en && !empty) begin
      n_rd++;
      if (sb.size() == 0 || sb[0] != rd_data) begin
        n_mismatch++;
        if (n_mismatch < 5)
          $display("FAIL read %0d: got %0d expected %0d", n_rd, rd_data,
                   sb.size() ? sb[0] : '0);
      end
      if (sb.size() != 0) void'(sb.pop_front());
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // writes n words, offering one per write clock with probability pct %
  task automatic write_words(input int n, input int pct);
    int target = n_wr + n;
    forever begin
      @(negedge wr_clk);
      if (n_wr >= target) break;
      wr_en = ($urandom_range(0, 99) < pct);
      wr_data = WIDTH'($urandom);
    end
    wr_en = 0;
  endtask

  task automatic drain();
    rd_en = 1;
    repeat (200) @(posedge rd_clk);
    rd_en = 0;
  endtask

  initial begin
    int fc0, ec0;
    repeat (4) @(posedge rd_clk);
    rst_n = 1;
    check(empty && !full, "empty and not full after reset");

    // phase 1: writer about 3x faster than reader, reader pops at random
    fc0 = n_full_clks;
    fork
      write_words(200, 100);
      forever begin @(negedge rd_clk) rd_en = ($urandom_range(0, 3) != 0); end
    join_any
    disable fork;
    drain();
    check(n_full_clks > fc0, "fast writer: full asserted");
    check(n_rd == 200 && n_wr == 200 && sb.size() == 0, $sformatf(
          "fast writer: %0d written, %0d read", n_wr, n_rd));

    // phase 2: writer much slower than reader
    wr_half = 23.0; rd_half = 5.0;
    ec0 = n_empty_clks;
    rd_en = 1;
    write_words(100, 40);
    drain();
    check(n_empty_clks > ec0 + 100, "slow writer: empty between words");
    check(n_rd == 300 && sb.size() == 0, $sformatf(
          "slow writer: %0d read", n_rd));

    // phase 3: reader stopped; exactly DEPTH words fit
    wr_half = 9.04; rd_half = 10.0;
    rd_en = 0;
    write_words(DEPTH, 100);
    repeat (4) @(posedge wr_clk);
    check(full, "full after DEPTH words");
    @(negedge wr_clk) begin wr_en = 1; wr_data = '1; end
    @(posedge wr_clk);
    @(negedge wr_clk) wr_en = 0;
    check(n_wr == 300 + DEPTH, "write refused while full");
    drain();
    repeat (4) @(posedge wr_clk);
    check(empty && !full, "empty and not full after draining");
    check(n_rd == 300 + DEPTH && sb.size() == 0, $sformatf(
          "stopped reader: %0d read", n_rd));

    check(n_mismatch == 0, $sformatf("%0d words out of order", n_mismatch));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
