// avalon_slave: the processor's window into the card-counter fabric, an
// Avalon memory-mapped slave with 32-bit data and word addresses.
//
// address[19:17] selects a region (bjc_pkg::region_e), address[16:0] is
// the offset inside it. Writes to the image, convolution-weight, FC-weight
// and FC-bias regions are forwarded on the mem_* port to the CNN's
// memories (write only). The control region holds:
//   0 CTRL    W  bit0: start a classification, bit1: start camera setup
//   1 STATUS  R  bit0 CNN busy, bit1 class valid (set when a
//                classification ends, cleared by a new start),
//                bit2 camera setup busy, bit3 last frame complete
//   2 CLASS   R  last card class, 1..52
//   3 SCORE   RW signed card count shown on the display (16 bit)
//   4 CAMCTL  RW bit0 capture camera frames
//   5 FRAMES  R  frames captured
//   6 DISPBUF R  the 24-bit display buffer
// Reads have a fixed latency of one clock (readdata is valid the clock
// after read); there is no waitrequest. Unmapped reads return 0.
// The bus follows the statement that the parts are joined over Avalon;
// the register map is this design's own.
module avalon_slave
  import bjc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // Avalon-MM slave
  input  logic [AV_ADDR_W-1:0] address,
  input  logic                 write,
  input  logic [31:0]          writedata,
  input  logic                 read,
  output logic [31:0]          readdata,
  // CNN memory write port
  output logic                 mem_we,
  output region_e              mem_region,
  output logic [AV_OFS_W-1:0]  mem_ofs,
  output logic [31:0]          mem_wdata,
  // control / status
  output logic                 cnn_start,
  input  logic                 cnn_busy,
  input  logic                 cnn_done,
  input  class_t               cnn_class,
  output logic                 cam_cfg_start,
  input  logic                 cam_cfg_busy,
  output logic                 cap_enable,
  input  logic [15:0]          frame_count,
  input  logic                 frame_ok,
  output logic signed [15:0]   score,
  input  logic [23:0]          disp_buf
);
  region_e             region;
  logic [AV_OFS_W-1:0] ofs;
  logic                ctrl_sel;
  assign region   = region_e'(address[AV_ADDR_W-1 -: 3]);
  assign ofs      = address[AV_OFS_W-1:0];
  assign ctrl_sel = (region == R_CTRL);

  assign mem_we     = write && (region == R_IMAGE || region == R_CONV_W ||
                                region == R_FC_W  || region == R_FC_B);
  assign mem_region = region;
  assign mem_ofs    = ofs;
  assign mem_wdata  = writedata;

  logic   class_valid;
  class_t class_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnn_start <= 1'b0; cam_cfg_start <= 1'b0; cap_enable <= 1'b0;
      score <= '0; class_valid <= 1'b0; class_q <= '0; readdata <= '0;
    end else begin
      cnn_start     <= 1'b0;
      cam_cfg_start <= 1'b0;
      if (cnn_done) begin
        class_valid <= 1'b1;
        class_q     <= cnn_class;
      end
      if (write && ctrl_sel) begin
        unique case (ofs[3:0])
          REG_CTRL: begin
            cnn_start     <= writedata[0];
            cam_cfg_start <= writedata[1];
            if (writedata[0]) class_valid <= 1'b0;
          end
          REG_SCORE:  score      <= writedata[15:0];
          REG_CAMCTL: cap_enable <= writedata[0];
          default: ;
        endcase
      end
      if (read) begin
        readdata <= '0;
        if (ctrl_sel) begin
          unique case (ofs[3:0])
            REG_STATUS:  readdata <= {28'd0, frame_ok, cam_cfg_busy, class_valid, cnn_busy};
            REG_CLASS:   readdata <= 32'(class_q);
            REG_SCORE:   readdata <= 32'(score);
            REG_CAMCTL:  readdata <= {31'd0, cap_enable};
            REG_FRAMES:  readdata <= {16'd0, frame_count};
            REG_DISPBUF: readdata <= {8'd0, disp_buf};
            default:     readdata <= '0;
          endcase
        end
      end
    end
  end
endmodule
