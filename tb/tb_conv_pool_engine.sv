// tb_conv_pool_engine: runs layers of several sizes, pooling factors and
// weight sets on random images and compares every output pixel with a
// reference computed here (zero-padded 7x7 window sum, shift by 16,
// clamp to 0..255, floor mean over pool x pool). Checks the clock count
// out_dim^2 * pool^2 * 49 + 2 from start to done, and counts how often
// the reference hit padding, ReLU clamping and saturation.
module tb_conv_pool_engine;
  import bjc_pkg::*;
  localparam int unsigned DIM_W = 10, FADDR_W = 17, WADDR_W = 9;
  localparam int unsigned MAXW = 400;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [DIM_W-1:0] in_dim = '0, out_dim = '0;
  logic [2:0] pool = 3'd1, layer = '0;
  logic fm_re, w_re, out_we;
  logic [FADDR_W-1:0] fm_raddr, out_waddr;
  logic [WADDR_W-1:0] w_raddr;
  pixel_t fm_rdata, out_wdata;
  weight_t w_rdata [NCH];

  pixel_t  img  [MAXW];
  pixel_t  outm [MAXW];
  weight_t wmem [NCH][NCONV*49];
  int checks = 0, failures = 0;
  int n_pad = 0, n_relu = 0, n_sat = 0, n_wr = 0;

  conv_pool_engine #(.DIM_W(DIM_W), .FADDR_W(FADDR_W), .WADDR_W(WADDR_W)) dut (.*);
  always #5 clk = ~clk;

  // memories with one clock of read latency
  always @(posedge clk) begin
    if (fm_re) fm_rdata <= (32'(fm_raddr) < MAXW) ? img[fm_raddr] : '0;
    if (w_re) for (int c = 0; c < NCH; c++) w_rdata[c] <= wmem[c][w_raddr];
    if (out_we) begin outm[out_waddr] <= out_wdata; n_wr++; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int ref_act(input int d, input int l, input int c, input int y, input int x);
    longint acc;
    longint sh;
    acc = 0;
    for (int ky = 0; ky < 7; ky++)
      for (int kx = 0; kx < 7; kx++) begin
        int iy, ix;
        iy = y + ky - 3; ix = x + kx - 3;
        if (iy < 0 || ix < 0 || iy >= d || ix >= d) n_pad++;
        else acc += longint'(img[iy*d+ix][c*8 +: 8]) * longint'(wmem[c][l*49 + ky*7 + kx]);
      end
    sh = acc >>> 16;
    if (sh < 0) begin n_relu++; return 0; end
    if (sh > 255) begin n_sat++; return 255; end
    return int'(sh);
  endfunction

  task automatic run_layer(input int d, input int p, input int l);
    int od, cyc, bad;
    od = d / p;
    for (int i = 0; i < d * d; i++) img[i] = pixel_t'($urandom);
    for (int c = 0; c < NCH; c++)
      for (int k = 0; k < 49; k++)
        wmem[c][l*49 + k] = weight_t'(int'($urandom_range(0, 10485)) - 3932);   // about -0.06 .. +0.1
    for (int i = 0; i < od * od; i++) outm[i] = '0;
    in_dim = DIM_W'(d); out_dim = DIM_W'(od); pool = 3'(p); layer = 3'(l);
    n_wr = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == od * od * p * p * 49 + 2, $sformatf("layer d=%0d p=%0d took %0d clocks", d, p, cyc));
    @(negedge clk);
    check(n_wr == od * od, $sformatf("%0d writes", n_wr));
    check(!busy, "idle after done");
    bad = 0;
    for (int oy = 0; oy < od; oy++)
      for (int ox = 0; ox < od; ox++)
        for (int c = 0; c < NCH; c++) begin
          int s;
          s = 0;
          for (int py = 0; py < p; py++)
            for (int px = 0; px < p; px++) s += ref_act(d, l, c, oy*p+py, ox*p+px);
          if (int'(outm[oy*od+ox][c*8 +: 8]) != s / (p*p)) begin
            if (bad < 5) $display("  mismatch d=%0d p=%0d (%0d,%0d,%0d): got %0d exp %0d",
                                  d, p, oy, ox, c, outm[oy*od+ox][c*8 +: 8], s / (p*p));
            bad++;
          end
          checks++;
        end
    failures += bad;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_layer(12, 1, 0);
    run_layer(12, 2, 3);
    run_layer(12, 3, 5);
    run_layer(10, 5, 1);
    run_layer(8, 4, 2);
    check(n_pad > 0, "zero padding used");
    check(n_relu > 0, "ReLU clamped negatives");
    check(n_sat > 0, "saturation at 255 reached");
    $display("padding taps %0d, relu clamps %0d, saturations %0d", n_pad, n_relu, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
