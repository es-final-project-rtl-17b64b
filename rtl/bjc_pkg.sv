// bjc_pkg: types and constants shared by the card-counter fabric.
//
// Holds the fixed-point format of the CNN weights, the geometry of the
// network (7x7 kernels, 3 colour channels, 10x10x3 feature vector into a
// 52-way classifier), the 4-bit glyph codes used in the display buffer and
// the region map of the processor-facing Avalon-MM slave.
//
// Taken from the design description: the 7x7x3 kernels, six convolution
// layers, one fully connected layer from 10x10x3 to 52 classes, 8-bit
// colour channels, 4-byte weights, 6 display digits of 4 bits.
// Own choices: the weights are signed Q16.16 fixed point, the glyph codes
// for letters and minus sign, and the address map.
package bjc_pkg;

  // ---------------- CNN geometry ----------------
  localparam int unsigned NCH      = 3;    // colour channels (R,G,B)
  localparam int unsigned KSIZE    = 7;    // convolution kernel edge
  localparam int unsigned NCONV    = 6;    // convolution layers
  localparam int unsigned FC_DIM   = 10;   // edge of the feature map fed to the FC layer
  localparam int unsigned NCLASS   = 52;   // card classes
  localparam int unsigned PIX_W    = 8;    // bits per channel value
  localparam int unsigned WGT_W    = 32;   // bits per weight (4 bytes)
  localparam int unsigned WGT_FRAC = 16;   // fractional bits of a weight (Q16.16)
  localparam int unsigned ACC_W    = 48;   // accumulator width

  typedef logic [PIX_W-1:0]           chan_t;   // one channel value
  typedef logic [NCH*PIX_W-1:0]       pixel_t;  // {ch2, ch1, ch0}
  typedef logic signed [WGT_W-1:0]    weight_t;
  typedef logic signed [ACC_W-1:0]    acc_t;
  typedef logic [5:0]                 class_t;  // 1..52, 0 = none yet

  // ---------------- display glyphs ----------------
  // Codes 0..9 show the decimal digit, the rest show letters or a sign.
  typedef enum logic [3:0] {
    G_P     = 4'hA,
    G_L     = 4'hB,
    G_Y     = 4'hC,
    G_H     = 4'hD,
    G_D     = 4'hE,
    G_MINUS = 4'hF
  } glyph_e;

  // ---------------- Avalon-MM map (word addresses) ----------------
  localparam int unsigned AV_ADDR_W = 20;
  localparam int unsigned AV_OFS_W  = 17;
  typedef enum logic [2:0] {
    R_IMAGE   = 3'd0,  // offset = y*W + x, data[23:0] = {ch2,ch1,ch0}
    R_CONV_W  = 3'd1,  // offset = ch*512 + layer*49 + ky*7 + kx
    R_FC_W    = 3'd2,  // offset = class*300 + (y*10+x)*3 + ch
    R_FC_B    = 3'd3,  // offset = class
    R_CTRL    = 3'd4   // control and status registers, see avalon_slave
  } region_e;

  // control register offsets inside R_CTRL
  localparam logic [3:0] REG_CTRL    = 4'd0; // W: bit0 start CNN, bit1 start camera config
  localparam logic [3:0] REG_STATUS  = 4'd1; // R: bit0 cnn busy, bit1 cnn done, bit2 cam cfg busy
  localparam logic [3:0] REG_CLASS   = 4'd2; // R: last class (1..52)
  localparam logic [3:0] REG_SCORE   = 4'd3; // RW: signed running count
  localparam logic [3:0] REG_CAMCTL  = 4'd4; // RW: bit0 capture enable
  localparam logic [3:0] REG_FRAMES  = 4'd5; // R: frames captured
  localparam logic [3:0] REG_DISPBUF = 4'd6; // R: display buffer

endpackage
