// tb_cnn_forward: loads random images and weights through the host port
// of a reduced network (60x60 image, pooling 2,3,1,1,1,1) and compares
// the class and winning score with cnn_ref_model. A second image is run
// without reloading the weights, a third with new weights. Checks the clock count against the sum
// of the layer workloads plus at most 8 clocks per layer.
module tb_cnn_forward;
  import bjc_pkg::*;
  localparam int unsigned IMG = 60;
  localparam int unsigned POOL [6] = '{2, 3, 1, 1, 1, 1};
  logic clk = 0, rst_n = 0, host_we = 0, start = 0, busy, done;
  region_e host_region = R_IMAGE;
  logic [AV_OFS_W-1:0] host_ofs = '0;
  logic [31:0] host_wdata = '0;
  class_t class_o;
  acc_t max_score;
  int checks = 0, failures = 0;

  cnn_forward #(.IMG_DIM(IMG), .POOL(POOL)) dut (.*);
  cnn_ref_model #(.IMG_DIM(IMG), .POOL(POOL)) m ();
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic hw(input region_e r, input int ofs, input int data);
    host_we = 1; host_region = r; host_ofs = AV_OFS_W'(ofs); host_wdata = data;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic load_image();
    for (int i = 0; i < IMG * IMG; i++)
      hw(R_IMAGE, i, {8'd0, 8'(m.img[i*3+2]), 8'(m.img[i*3+1]), 8'(m.img[i*3])});
  endtask

  task automatic load_weights();
    for (int c = 0; c < 3; c++) for (int k = 0; k < 294; k++) hw(R_CONV_W, c * 512 + k, m.cw[c][k]);
    for (int i = 0; i < 15600; i++) hw(R_FC_W, i, m.fw[i]);
    for (int o = 0; o < 52; o++) hw(R_FC_B, o, m.fb[o]);
  endtask

  task automatic classify();
    longint cyc;
    m.run();
    start = 1;
    @(negedge clk);
    start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(class_o == class_t'(m.best_class), $sformatf("class %0d expected %0d", class_o, m.best_class));
    check(max_score == acc_t'(m.best_score), $sformatf("score %0d expected %0d", max_score, m.best_score));
    check(cyc >= m.conv_clocks() + 15600 && cyc <= m.conv_clocks() + 15600 + 8 * 7,
          $sformatf("clocks %0d, workload %0d", cyc, m.conv_clocks() + 15600));
    $display("class %0d in %0d clocks (padding %0d, relu %0d, saturation %0d)",
             class_o, cyc, m.n_pad, m.n_relu, m.n_sat);
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m.new_weights();
    m.new_image();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    load_weights();
    load_image();
    classify();
    // new image, same weights
    m.new_image();
    load_image();
    classify();
    // new weights and image
    m.new_weights();
    m.new_image();
    load_weights();
    load_image();
    classify();
    check(m.n_relu > 0 && m.n_sat > 0 && m.n_pad > 0, "clamping, saturation and padding all occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
