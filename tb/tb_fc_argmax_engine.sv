// tb_fc_argmax_engine: random feature vectors, weights and biases; the
// reference computes all 52 scores W x + b and takes the first largest.
// Trials force the winner to the first class, the last class and a tie.
// Checks class, winning score and the 52*300 + 2 clock latency.
module tb_fc_argmax_engine;
  import bjc_pkg::*;
  localparam int unsigned IN_DIM = 10, NOUT = 52, NW = IN_DIM * IN_DIM;
  localparam int unsigned FADDR_W = 17, WADDR_W = 14, BADDR_W = 6;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  class_t class_o;
  acc_t max_score;
  logic fm_re, w_re, b_re;
  logic [FADDR_W-1:0] fm_raddr;
  logic [WADDR_W-1:0] w_raddr;
  logic [BADDR_W-1:0] b_raddr;
  pixel_t fm_rdata;
  weight_t w_rdata, b_rdata;

  pixel_t  fm [NW];
  weight_t wm [NOUT * NW * NCH];
  weight_t bm [NOUT];
  int checks = 0, failures = 0;

  fc_argmax_engine #(.IN_DIM(IN_DIM), .NOUT(NOUT), .FADDR_W(FADDR_W), .WADDR_W(WADDR_W),
                     .BADDR_W(BADDR_W)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (fm_re) fm_rdata <= fm[fm_raddr];
    if (w_re) w_rdata <= wm[w_raddr];
    if (b_re) b_rdata <= bm[b_raddr];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // mode 0: random, 1: class 1 wins, 2: class 52 wins, 3: tie between 10 and 20
  task automatic trial(input int mode);
    longint sc [NOUT];
    longint best;
    int bi, cyc;
    for (int i = 0; i < NW; i++) fm[i] = pixel_t'($urandom);
    for (int i = 0; i < NOUT * NW * NCH; i++) wm[i] = weight_t'(int'($urandom_range(0, 2000)) - 1000);
    for (int o = 0; o < NOUT; o++) bm[o] = weight_t'(int'($urandom_range(0, 200000)) - 100000);
    if (mode == 1) bm[0] = 32'sh4000_0000;
    if (mode == 2) bm[NOUT-1] = 32'sh4000_0000;
    if (mode == 3) begin
      for (int i = 0; i < NW * NCH; i++) wm[19*NW*NCH + i] = wm[9*NW*NCH + i];
      bm[9] = 32'sh4000_0000; bm[19] = 32'sh4000_0000;
    end
    for (int o = 0; o < NOUT; o++) begin
      sc[o] = longint'(bm[o]);
      for (int i = 0; i < NW * NCH; i++)
        sc[o] += longint'(fm[i / NCH][(i % NCH)*8 +: 8]) * longint'(wm[o*NW*NCH + i]);
    end
    best = sc[0]; bi = 0;
    for (int o = 1; o < NOUT; o++) if (sc[o] > best) begin best = sc[o]; bi = o; end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == NOUT * NW * NCH + 2, $sformatf("latency %0d", cyc));
    check(class_o == class_t'(bi + 1), $sformatf("mode %0d class %0d expected %0d", mode, class_o, bi + 1));
    check(max_score == acc_t'(best), $sformatf("mode %0d score %0d expected %0d", mode, max_score, best));
    if (mode == 1) check(class_o == 1, "first class wins");
    if (mode == 2) check(class_o == 52, "last class wins");
    if (mode == 3) check(class_o == 10, "tie keeps lower class");
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    trial(0); trial(0); trial(1); trial(2); trial(3); trial(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
