// blackjack_counter_top: FPGA fabric of a camera-based blackjack card
// counter.
//
// A camera watches the table; the processor configures it, fetches its
// frames, pre-processes them (crop, downsample) into a 300x300 RGB image
// and writes that image into this fabric over Avalon. The CNN forward
// pass names the card it sees (class 1..52); the processor reads the
// class, updates the Hi-Lo running count in software and writes it back
// as the score, which the display logic shows on six 7-segment digits
// together with a play/wait instruction.
//
// Parts: avalon_slave (register and memory window), cnn_forward (CNN and
// its on-chip memories), display_logic + six seg7_decoder (score display),
// camera_capture (pixel bus to the raw-image memory, whose write port is
// brought out to the board's SDRAM controller), camera_config (camera
// register setup over SCCB). All run on the one system clock clk
// (50 MHz on the target board); rst_n is an asynchronous active-low reset.
// The split into hardware and software and the parts follow the described
// system; the ports, the register map and the buses inside are this
// design's own.
module blackjack_counter_top
  import bjc_pkg::*;
#(
  parameter int unsigned IMG_DIM      = 300,
  parameter int unsigned POOL [NCONV] = '{2, 3, 5, 1, 1, 1},
  parameter int unsigned CLK_HZ       = 50_000_000,
  parameter int unsigned SCL_HZ       = 100_000,
  parameter int unsigned CAM_H_PIX    = 640,
  parameter int unsigned CAM_V_LINES  = 480,
  parameter int unsigned RAW_ADDR_W   = $clog2(CAM_H_PIX * CAM_V_LINES * 3)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // Avalon-MM slave (from the processor)
  input  logic [AV_ADDR_W-1:0]  av_address,
  input  logic                  av_write,
  input  logic [31:0]           av_writedata,
  input  logic                  av_read,
  output logic [31:0]           av_readdata,
  // camera pixel bus (GPIO)
  input  logic                  cam_pclk,
  input  logic                  cam_vsync,
  input  logic                  cam_href,
  input  logic [7:0]            cam_d,
  // camera configuration bus (GPIO), SDA open drain
  output logic                  cam_scl,
  output logic                  cam_sda_oe,
  // raw camera image, to the FPGA SDRAM
  output logic                  raw_wr_valid,
  output logic [RAW_ADDR_W-1:0] raw_wr_addr,
  output logic [7:0]            raw_wr_data,
  // six 7-segment displays, active low {g,f,e,d,c,b,a}
  output logic [6:0]            hex [6]
);
  logic                mem_we;
  region_e             mem_region;
  logic [AV_OFS_W-1:0] mem_ofs;
  logic [31:0]         mem_wdata;
  logic                cnn_start, cnn_busy, cnn_done;
  class_t              cnn_class;
  acc_t                cnn_max_score;
  logic                cam_cfg_start, cam_cfg_busy, cam_cfg_done;
  logic                cap_enable, frame_done, frame_ok;
  logic [15:0]         frame_count;
  logic signed [15:0]  score;
  logic [23:0]         disp_buf;
  logic                disp_updated;

  avalon_slave u_av (
    .clk, .rst_n,
    .address(av_address), .write(av_write), .writedata(av_writedata),
    .read(av_read), .readdata(av_readdata),
    .mem_we, .mem_region, .mem_ofs, .mem_wdata,
    .cnn_start, .cnn_busy, .cnn_done, .cnn_class,
    .cam_cfg_start, .cam_cfg_busy, .cap_enable, .frame_count, .frame_ok,
    .score, .disp_buf
  );

  cnn_forward #(.IMG_DIM(IMG_DIM), .POOL(POOL)) u_cnn (
    .clk, .rst_n,
    .host_we(mem_we), .host_region(mem_region), .host_ofs(mem_ofs), .host_wdata(mem_wdata),
    .start(cnn_start), .busy(cnn_busy), .done(cnn_done),
    .class_o(cnn_class), .max_score(cnn_max_score)
  );

  display_logic #(.SCORE_W(16)) u_disp (
    .clk, .rst_n, .score, .disp_buf, .updated(disp_updated)
  );

  for (genvar i = 0; i < 6; i++) begin : g_hex
    seg7_decoder u_seg (.code(disp_buf[4*i +: 4]), .seg_n(hex[i]));
  end

  camera_capture #(.H_PIX(CAM_H_PIX), .V_LINES(CAM_V_LINES), .BYTES_PP(3), .ADDR_W(RAW_ADDR_W)) u_cap (
    .clk, .rst_n, .enable(cap_enable),
    .cam_pclk, .cam_vsync, .cam_href, .cam_d,
    .wr_valid(raw_wr_valid), .wr_addr(raw_wr_addr), .wr_data(raw_wr_data),
    .frame_done, .frame_ok, .frame_count
  );

  camera_config #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ)) u_camcfg (
    .clk, .rst_n, .start(cam_cfg_start), .busy(cam_cfg_busy), .done(cam_cfg_done),
    .scl(cam_scl), .sda_oe(cam_sda_oe)
  );
endmodule
