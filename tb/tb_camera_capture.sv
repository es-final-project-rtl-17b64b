// tb_camera_capture: drives the camera pixel bus (PCLK, VSYNC, HREF,
// D[7:0]) with small frames and checks the bytes written, their
// addresses, frame_ok/frame_count, that a frame started while capture is
// disabled is not written, that a frame at the fastest camera PCLK
// (0.553 of the system clock) arrives intact, and that short and long
// frames are flagged.
module tb_camera_capture;
  localparam int unsigned H = 5, V = 4, BPP = 3, NB = H * V * BPP;
  localparam int unsigned AW = $clog2(NB);
  logic clk = 0, rst_n = 0, enable = 0;
  logic cam_pclk = 0, cam_vsync = 0, cam_href = 0;
  logic [7:0] cam_d = '0;
  logic wr_valid, frame_done, frame_ok;
  logic [AW-1:0] wr_addr;
  logic [7:0] wr_data;
  logic [15:0] frame_count;
  logic [7:0] mem [NB];
  int nwr = 0, nbad_addr = 0;
  int checks = 0, failures = 0;

  camera_capture #(.H_PIX(H), .V_LINES(V), .BYTES_PP(BPP), .ADDR_W(AW)) dut (.*);
  always #5 clk = ~clk;          // system clock, period 10
  always @(posedge clk) if (wr_valid) begin
    if (32'(wr_addr) < NB) mem[wr_addr] <= wr_data; else nbad_addr++;
    nwr++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one PCLK period of 2*half; data changes on the falling edge
  real half = 20.0;
  task automatic pclk_cycle(input logic href, input logic [7:0] d);
    cam_href = href; cam_d = d;
    #(half) cam_pclk = 1;
    #(half) cam_pclk = 0;
  endtask

  task automatic send_frame(input int lines, input int seed);
    cam_vsync = 1;
    repeat (3) pclk_cycle(0, 8'h00);
    for (int l = 0; l < lines; l++) begin
      for (int b = 0; b < H * BPP; b++) pclk_cycle(1, 8'((seed + l * H * BPP + b) * 7));
      repeat (4) pclk_cycle(0, 8'hEE);   // horizontal blanking, not stored
    end
    cam_vsync = 0;
    repeat (6) pclk_cycle(0, 8'h00);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) pclk_cycle(0, 8'h00);   // the camera clock runs during reset
    repeat (2) @(negedge clk);
    rst_n = 1;
    // disabled: nothing written
    send_frame(V, 0);
    check(nwr == 0 && frame_count == 0, "disabled frame ignored");
    enable = 1;
    send_frame(V, 11);
    check(nwr == NB, $sformatf("bytes written %0d", nwr));
    check(frame_count == 1 && frame_ok, "frame 1 complete");
    begin
      int bad = 0;
      for (int i = 0; i < NB; i++) if (mem[i] != 8'((11 + i) * 7)) bad++;
      check(bad == 0, $sformatf("%0d wrong bytes in frame 1", bad));
    end
    send_frame(V, 50);
    check(nwr == 2 * NB && frame_count == 2 && frame_ok, "frame 2 complete");
    begin
      int bad = 0;
      for (int i = 0; i < NB; i++) if (mem[i] != 8'((50 + i) * 7)) bad++;
      check(bad == 0, $sformatf("%0d wrong bytes in frame 2", bad));
    end
    // PCLK at 0.553 of the system clock (27.648 MHz against 50 MHz)
    half = 9.04;
    send_frame(V, 77);
    check(nwr == 3 * NB && frame_count == 3 && frame_ok, "fast-PCLK frame complete");
    begin
      int bad = 0;
      for (int i = 0; i < NB; i++) if (mem[i] != 8'((77 + i) * 7)) bad++;
      check(bad == 0, $sformatf("%0d wrong bytes in fast frame", bad));
    end
    half = 20.0;
    send_frame(V - 1, 3);           // short frame
    check(frame_count == 4 && !frame_ok, "short frame flagged");
    send_frame(V + 1, 3);           // long frame: extra line dropped
    check(frame_count == 5 && !frame_ok && nbad_addr == 0, "long frame flagged, no stray writes");
    check(nwr == 3 * NB + (V - 1) * H * BPP + NB, "long frame truncated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
