// camera_capture: receives frames from the OV7670 camera's parallel pixel
// bus and writes them, byte by byte, to the raw-image memory.
//
// The camera sends one byte of RGB data per pixel-clock period on 8 data
// lines; VSYNC high marks an active frame and HREF high marks valid bytes
// within a line. The pins are sampled on the rising edge of the camera's
// own PCLK. In that clock domain each valid byte, and each frame start
// (VSYNC rising) and frame end (VSYNC falling), becomes one 10-bit entry
// {kind, byte} of an async_fifo. The system-clock side pops one entry per
// clock, so it keeps up with any PCLK below the system clock (the
// camera's 27.648 MHz maximum against 50 MHz).
// A frame is captured only if capture is enabled when its start entry is
// popped; its bytes are written to consecutive byte addresses from 0.
// At its end entry frame_done pulses, frame_count increments and
// frame_ok tells whether exactly H_PIX*V_LINES*BYTES_PP bytes arrived;
// bytes beyond that count are not written.
// Write port: wr_valid pulses one system clock per byte with wr_addr and
// wr_data; the memory behind it is expected to take every byte.
// Latency from the PCLK edge to wr_valid: about 4 system clocks.
// rst_n is asynchronous; its release is synchronised into the PCLK domain,
// so PCLK must be running around reset release for capture to start.
// The two synchroniser flops are themselves cleared by rst_n and their
// output is the asynchronous reset of the PCLK-domain flops, the usual
// reset-synchroniser pattern.
// From the description: 8 data pins, one byte per pixel clock, 640x480
// pixels of 3 bytes, active-high frame and line valid, PCLK up to
// 27.648 MHz. Own choices: the FIFO crossing, the enable, the error flag
// and byte-wise addressing.
module camera_capture #(
  parameter int unsigned H_PIX    = 640,
  parameter int unsigned V_LINES  = 480,
  parameter int unsigned BYTES_PP = 3,
  parameter int unsigned ADDR_W   = $clog2(H_PIX * V_LINES * BYTES_PP)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  // camera pins
  input  logic              cam_pclk,
  input  logic              cam_vsync,
  input  logic              cam_href,
  input  logic [7:0]        cam_d,
  // raw-image memory write port
  output logic              wr_valid,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [7:0]        wr_data,
  // status
  output logic              frame_done,
  output logic              frame_ok,
  output logic [15:0]       frame_count
);
  localparam int unsigned FRAME_BYTES = H_PIX * V_LINES * BYTES_PP;

  typedef enum logic [1:0] {K_BYTE = 2'd0, K_START = 2'd1, K_END = 2'd2} kind_e;

  // ---------------- PCLK domain ----------------
  logic [1:0] prst;
  logic       p_rst_n;
  always_ff @(posedge cam_pclk or negedge rst_n) begin
    if (!rst_n) prst <= '0;
    else        prst <= {prst[0], 1'b1};
  end
  assign p_rst_n = prst[1];

  logic       vsync_q, f_we, f_full;
  logic [9:0] f_wdata;

  always_ff @(posedge cam_pclk or negedge p_rst_n) begin
    if (!p_rst_n) vsync_q <= 1'b0;
    else begin
      vsync_q <= cam_vsync;
      assert (!(f_we && f_full)) else $error("camera_capture: FIFO overflow");
    end
  end

  always_comb begin
    f_we    = 1'b0;
    f_wdata = {K_BYTE, cam_d};
    if (cam_vsync && !vsync_q)      begin f_we = 1'b1; f_wdata = {K_START, 8'd0}; end
    else if (!cam_vsync && vsync_q) begin f_we = 1'b1; f_wdata = {K_END, 8'd0};   end
    else if (cam_vsync && cam_href)       f_we = 1'b1;
  end

  // ---------------- crossing ----------------
  logic       f_empty, f_re;
  logic [9:0] f_rdata;

  async_fifo #(.WIDTH(10), .DEPTH(16)) u_fifo (
    .wr_clk(cam_pclk), .wr_rst_n(p_rst_n), .wr_en(f_we), .wr_data(f_wdata), .full(f_full),
    .rd_clk(clk), .rd_rst_n(rst_n), .rd_en(f_re), .rd_data(f_rdata), .empty(f_empty)
  );
  assign f_re = !f_empty;

  // ---------------- system clock domain ----------------
  logic            armed;
  logic [ADDR_W:0] count;   // bytes received in this frame
  kind_e           kind;
  assign kind = kind_e'(f_rdata[9:8]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed <= 1'b0; count <= '0;
      wr_valid <= 1'b0; wr_addr <= '0; wr_data <= '0;
      frame_done <= 1'b0; frame_ok <= 1'b0; frame_count <= '0;
    end else begin
      wr_valid   <= 1'b0;
      frame_done <= 1'b0;
      if (!f_empty) begin
        unique case (kind)
          K_START: begin
            armed <= enable;
            count <= '0;
          end
          K_END: if (armed) begin
            armed       <= 1'b0;
            frame_done  <= 1'b1;
            frame_ok    <= (32'(count) == FRAME_BYTES);
            frame_count <= frame_count + 16'd1;
          end
          default: if (armed) begin
            if (32'(count) < FRAME_BYTES) begin
              wr_valid <= 1'b1;
              wr_addr  <= ADDR_W'(count);
              wr_data  <= f_rdata[7:0];
            end
            count <= count + 1'b1;
          end
        endcase
      end
    end
  end
endmodule
