// tb_blackjack_counter_top: end-to-end test of the card-counter fabric at
// its default size (300x300 image, 640x480 camera frames, 50 MHz clock).
//
// Plays the processor's part over Avalon: sets up the camera over SCCB,
// enables capture and, while a full camera frame streams in on the pixel
// bus, loads random CNN weights and a random 300x300 image, starts a
// classification and reads the class. It compares the class with
// cnn_ref_model, updates a Hi-Lo running count from it (2..6 count +1,
// 7..9 count 0, tens, faces and aces count -1; class k is rank
// (k-1) mod 13 + 1 with 1 = ace) and writes the count as the score, then
// checks the display buffer and the six 7-segment outputs. The captured
// frame, sent at the camera's maximum pixel clock of 27.648 MHz, is
// checked byte by byte through its write port.
// Every mechanism is counted and must occur: pooling by 2, 3, 5 and 1,
// zero padding, ReLU clamping, saturation, the two camera register
// writes, a complete captured frame, the play and wait instructions and
// a negative count.
module tb_blackjack_counter_top;
  import bjc_pkg::*;
  localparam int unsigned H = 640, V = 480, NB = H * V * 3;
  logic clk = 0, rst_n = 0;
  logic [AV_ADDR_W-1:0] av_address = '0;
  logic av_write = 0, av_read = 0;
  logic [31:0] av_writedata = '0, av_readdata;
  logic cam_pclk = 0, cam_vsync = 0, cam_href = 0;
  logic [7:0] cam_d = '0;
  logic cam_scl, cam_sda_oe;
  logic raw_wr_valid;
  logic [19:0] raw_wr_addr;
  logic [7:0] raw_wr_data;
  logic [6:0] hex [6];
  int checks = 0, failures = 0;

  blackjack_counter_top dut (.*);
  cnn_ref_model m ();
  sccb_monitor mon (.scl(cam_scl), .sda_oe(cam_sda_oe));
  always #10 clk = ~clk;     // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- Avalon master ----------------
  semaphore bus = new(1);
  task automatic av_wr(input region_e r, input int ofs, input logic [31:0] d);
    bus.get(1);
    av_address = {r, AV_OFS_W'(ofs)}; av_writedata = d; av_write = 1;
    @(negedge clk);
    av_write = 0;
    bus.put(1);
  endtask
  task automatic av_rd(input int ofs, output logic [31:0] d);
    bus.get(1);
    av_address = {R_CTRL, AV_OFS_W'(ofs)}; av_read = 1;
    @(negedge clk);
    av_read = 0;
    d = av_readdata;
    bus.put(1);
  endtask

  // ---------------- camera ----------------
  function automatic logic [7:0] cam_byte(input int i);
    return 8'(i * 7 + (i >> 9));
  endfunction
  int raw_n = 0, raw_bad = 0;
  always @(posedge clk) if (raw_wr_valid) begin
    if (32'(raw_wr_addr) != raw_n || raw_wr_data != cam_byte(raw_n)) raw_bad++;
    raw_n++;
  end
  // PCLK at the camera's maximum, 27.648 MHz; data changes while PCLK is low
  task automatic pclk_cycle(input logic href, input logic [7:0] d);
    cam_href = href; cam_d = d;
    #18.084 cam_pclk = 1;
    #18.084 cam_pclk = 0;
  endtask
  task automatic send_frame();
    int i;
    i = 0;
    cam_vsync = 1;
    repeat (4) pclk_cycle(0, 8'h00);
    for (int l = 0; l < V; l++) begin
      for (int b = 0; b < H * 3; b++) begin pclk_cycle(1, cam_byte(i)); i++; end
      repeat (8) pclk_cycle(0, 8'h55);
    end
    cam_vsync = 0;
    repeat (8) pclk_cycle(0, 8'h00);
  endtask

  // ---------------- display ----------------
  function automatic logic [6:0] seg_of(input logic [3:0] code);
    string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                        "abcdefg", "abcdfg", "abefg", "def", "bcdfg", "bcefg", "bcdeg", "g"};
    logic [6:0] s;
    s = '1;
    foreach (lit[code][i]) s[lit[code][i] - "a"] = 1'b0;
    return s;
  endfunction
  int n_play = 0, n_wait = 0, n_neg = 0;
  task automatic show_score(input int score);
    logic [31:0] d;
    logic [3:0] dig [6];
    int mag;
    av_wr(R_CTRL, 3, 32'(score));
    repeat (40) @(negedge clk);
    mag = score < 0 ? -score : score;
    dig[0] = score >= 1 ? 4'hA : 4'hD;          // P / H
    dig[1] = 4'hB;                              // L
    dig[2] = score >= 1 ? 4'hC : 4'hE;          // y / d
    dig[3] = score < 0 ? 4'hF : 4'(mag / 100);
    dig[4] = 4'((mag / 10) % 10);
    dig[5] = 4'(mag % 10);
    av_rd(6, d);
    check(d[23:0] == {dig[5], dig[4], dig[3], dig[2], dig[1], dig[0]},
          $sformatf("display buffer %h for score %0d", d[23:0], score));
    for (int i = 0; i < 6; i++) check(hex[i] == seg_of(dig[i]), $sformatf("hex%0d for score %0d", i, score));
    if (score >= 1) n_play++; else n_wait++;
    if (score < 0) n_neg++;
  endtask

  function automatic int hilo(input int cls);
    int rank;
    rank = (cls - 1) % 13 + 1;
    if (rank >= 2 && rank <= 6) return 1;
    if (rank >= 7 && rank <= 9) return 0;
    return -1;
  endfunction

  initial begin
    #2000000000;   // 2 s of simulated time
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int count, cls;
    repeat (4) pclk_cycle(0, 8'h00);   // the camera clock runs during reset
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // camera register setup
    av_wr(R_CTRL, 0, 32'h2);
    repeat (2) @(negedge clk);
    av_rd(1, d);
    check(d[2], "camera setup busy");
    do av_rd(1, d); while (d[2]);
    repeat (10) @(negedge clk);
    check(mon.ntrans == 2 && mon.nbad == 0, "two camera register writes");
    check(mon.dev[0] == 8'h42 && mon.regs[0] == 8'h12 && mon.vals[0] == 8'h04, "COM7 = 0x04");
    check(mon.dev[1] == 8'h42 && mon.regs[1] == 8'h3E && mon.vals[1] == 8'h14, "COM14 = 0x14");
    av_wr(R_CTRL, 4, 32'h1);   // capture on
    fork
      send_frame();
      begin
        longint t0, cyc;
        m.new_weights();
        m.new_image();
        for (int c = 0; c < 3; c++) for (int k = 0; k < 294; k++) av_wr(R_CONV_W, c * 512 + k, m.cw[c][k]);
        for (int i = 0; i < 15600; i++) av_wr(R_FC_W, i, m.fw[i]);
        for (int o = 0; o < 52; o++) av_wr(R_FC_B, o, m.fb[o]);
        for (int i = 0; i < 300 * 300; i++)
          av_wr(R_IMAGE, i, {8'd0, 8'(m.img[i*3+2]), 8'(m.img[i*3+1]), 8'(m.img[i*3])});
        m.run();
        av_wr(R_CTRL, 0, 32'h1);
        t0 = 0;
        do begin av_rd(1, d); t0++; end while (!d[1]);
        cyc = t0;
        av_rd(2, d);
        cls = int'(d);
        check(cls == m.best_class, $sformatf("class %0d expected %0d", cls, m.best_class));
        check(cyc >= m.conv_clocks() + 15600 && cyc <= m.conv_clocks() + 15600 + 80,
              $sformatf("classification took %0d clocks, workload %0d", cyc, m.conv_clocks() + 15600));
        $display("class %0d after %0d clocks (%0.1f ms at 50 MHz)", cls, cyc, real'(cyc) / 50.0e3);
      end
    join
    repeat (20) @(negedge clk);
    check(raw_n == NB && raw_bad == 0, $sformatf("raw frame: %0d bytes, %0d wrong", raw_n, raw_bad));
    av_rd(5, d);
    check(d == 1, "one frame counted");
    av_rd(1, d);
    check(d[3], "frame complete");
    // card counting in software, the display in hardware
    count = 3;                       // cards already seen
    count += hilo(cls);
    show_score(count);
    show_score(count + 5);           // play
    show_score(-7);                  // wait, negative
    show_score(0);                   // wait
    show_score(142);
    // mechanisms
    check(m.pool_used[2] > 0 && m.pool_used[3] > 0 && m.pool_used[5] > 0 && m.pool_used[1] > 0,
          "pooling by 2, 3, 5 and 1");
    check(m.n_pad > 0, "zero padding");
    check(m.n_relu > 0, "ReLU clamping");
    check(m.n_sat > 0, "saturation");
    check(n_play > 0 && n_wait > 0 && n_neg > 0, "play, wait and negative count shown");
    $display("mechanisms: pool2=%0d pool3=%0d pool5=%0d pool1=%0d padding=%0d relu=%0d saturation=%0d sccb=%0d frames=%0d play=%0d wait=%0d negative=%0d",
             m.pool_used[2], m.pool_used[3], m.pool_used[5], m.pool_used[1], m.n_pad, m.n_relu, m.n_sat,
             mon.ntrans, raw_n / NB, n_play, n_wait, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
