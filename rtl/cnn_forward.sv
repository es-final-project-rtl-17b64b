// cnn_forward: the CNN forward pass that recognises the card in the
// pre-processed camera image, with the on-chip memories it works in.
//
// The image (IMG_DIM x IMG_DIM pixels, 3 channels of 8 bits, one 24-bit
// word per pixel) passes through NCONV = 6 layers of
//   7x7 per-channel convolution -> ReLU -> mean pooling (POOL[l] x POOL[l])
// computed by one shared conv_pool_engine, and then through the fully
// connected layer and class selection of fc_argmax_engine. The pooling
// factors shrink the default 300x300 image to the 10x10x3 feature map
// that the classifier expects (300 -150 -50 -10 -10 -10 -10).
// Layer outputs alternate between two feature-map buffers A and B, so
// the network needs no buffer as large as the image: layer 0 reads the
// image and writes A, layer 1 reads A and writes B, and so on; the
// classifier reads the buffer written by the last layer.
//
// Memories (all bram_sdp, written only through the host port):
//   image     IMG_DIM^2 words x 24 bit
//   conv_w[c] NCONV*49 words x 32 bit, one bank per channel
//   fc_w      52*300 words x 32 bit, fc_b 52 words x 32 bit
// Host port: host_we with a region (bjc_pkg::region_e) and an offset,
// mapped as listed in bjc_pkg. Host writes are taken at any time; writing
// the image or weights while busy corrupts the running classification.
//
// Timing: pulse start; busy rises the next clock; done pulses once when
// class_o (1..52) is valid. At the defaults one classification takes
// sum_l out_dim_l^2 * pool_l^2 * 49 + 15600 clocks + a few per layer
// (about 5.67 million clocks, 0.113 s at 50 MHz).
// From the description: the layer kinds, kernel size, channel count,
// six convolution layers, one 10x10x3 -> 52 linear layer, the image
// and weight sizes. Own choices: the order of layers and the pooling
// factors, the per-channel kernels, the ping-pong buffers.
module cnn_forward
  import bjc_pkg::*;
#(
  parameter int unsigned IMG_DIM      = 300,
  parameter int unsigned POOL [NCONV] = '{2, 3, 5, 1, 1, 1},
  parameter int unsigned DIM_W        = 10
) (
  input  logic                clk,
  input  logic                rst_n,
  // host write port
  input  logic                host_we,
  input  region_e             host_region,
  input  logic [AV_OFS_W-1:0] host_ofs,
  input  logic [31:0]         host_wdata,
  // control
  input  logic                start,
  output logic                busy,
  output logic                done,
  output class_t              class_o,
  output acc_t                max_score
);
  typedef int unsigned dims_t [NCONV+1];

  function automatic dims_t calc_dims();
    dims_t d;
    d[0] = IMG_DIM;
    for (int l = 0; l < NCONV; l++) d[l+1] = d[l] / POOL[l];
    return d;
  endfunction

  function automatic int unsigned buf_words(input int unsigned parity);
    dims_t d;
    int unsigned m;
    d = calc_dims();
    m = 1;
    for (int l = 0; l < NCONV; l++)
      if ((l % 2) == parity && d[l+1] * d[l+1] > m) m = d[l+1] * d[l+1];
    return m;
  endfunction

  localparam dims_t       DIMS    = calc_dims();
  localparam int unsigned IMG_WORDS = IMG_DIM * IMG_DIM;
  localparam int unsigned A_WORDS = buf_words(0);
  localparam int unsigned B_WORDS = buf_words(1);
  localparam int unsigned CW_WORDS = NCONV * KSIZE * KSIZE;
  localparam int unsigned FCW_WORDS = NCLASS * FC_DIM * FC_DIM * NCH;
  localparam int unsigned FADDR_W = AV_OFS_W;
  localparam int unsigned CWA_W   = 9;
  localparam int unsigned FCWA_W  = $clog2(FCW_WORDS + 1);
  localparam int unsigned FCBA_W  = $clog2(NCLASS + 1);
  localparam bit          FC_FROM_B = ((NCONV - 1) % 2) == 1;

  // elaboration-time check of the layer plan
  if (DIMS[NCONV] != FC_DIM) begin : g_bad_plan
    $error("cnn_forward: pooling plan does not end at the classifier input size");
  end
  if (IMG_WORDS > (1 << AV_OFS_W)) begin : g_bad_img
    $error("cnn_forward: image larger than the host address window");
  end

  // ---------------- sequencer ----------------
  typedef enum logic [2:0] {S_IDLE, S_CONV_GO, S_CONV_WAIT, S_FC_GO, S_FC_WAIT} state_e;
  state_e     state;
  logic [2:0] layer;
  logic       conv_start, conv_busy, conv_done;
  logic       fc_start, fc_busy, fc_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      layer <= '0;
    end else begin
      // the engines never run together
      assert (!(conv_busy && fc_busy)) else $error("cnn_forward: both engines busy");
      unique case (state)
        S_IDLE:      if (start) begin layer <= '0; state <= S_CONV_GO; end
        S_CONV_GO:   state <= S_CONV_WAIT;
        S_CONV_WAIT: if (conv_done) begin
                       if (32'(layer) == NCONV - 1) state <= S_FC_GO;
                       else begin layer <= layer + 3'd1; state <= S_CONV_GO; end
                     end
        S_FC_GO:     state <= S_FC_WAIT;
        S_FC_WAIT:   if (fc_done) state <= S_IDLE;
        default:     state <= S_IDLE;
      endcase
    end
  end

  assign conv_start = (state == S_CONV_GO);
  assign fc_start   = (state == S_FC_GO);
  assign busy       = (state != S_IDLE);
  assign done       = fc_done;

  logic [DIM_W-1:0] in_dim, out_dim;
  logic [2:0]       pool;
  always_comb begin
    in_dim  = '0;
    out_dim = '0;
    pool    = 3'd1;
    for (int l = 0; l < NCONV; l++)
      if (32'(layer) == l) begin
        in_dim  = DIM_W'(DIMS[l]);
        out_dim = DIM_W'(DIMS[l+1]);
        pool    = 3'(POOL[l]);
      end
  end

  // which buffer the current layer reads / writes
  logic rd_img, rd_a, wr_a;
  assign rd_img = (layer == 3'd0);
  assign rd_a   = !rd_img && layer[0];     // layers 1,3,5 read A
  assign wr_a   = !layer[0];               // layers 0,2,4 write A

  // ---------------- engines ----------------
  pixel_t img_rdata, a_rdata, b_rdata;
  logic               cv_fm_re, cv_w_re, cv_we;
  logic [FADDR_W-1:0] cv_fm_raddr, cv_waddr;
  logic [CWA_W-1:0]   cv_w_raddr;
  pixel_t             cv_fm_rdata, cv_wdata;
  weight_t            cv_w_rdata [NCH];

  conv_pool_engine #(.DIM_W(DIM_W), .FADDR_W(FADDR_W), .WADDR_W(CWA_W)) u_conv (
    .clk, .rst_n,
    .start(conv_start), .in_dim, .out_dim, .pool, .layer,
    .busy(conv_busy), .done(conv_done),
    .fm_re(cv_fm_re), .fm_raddr(cv_fm_raddr), .fm_rdata(cv_fm_rdata),
    .w_re(cv_w_re), .w_raddr(cv_w_raddr), .w_rdata(cv_w_rdata),
    .out_we(cv_we), .out_waddr(cv_waddr), .out_wdata(cv_wdata)
  );

  logic               fc_fm_re, fc_w_re, fc_b_re;
  logic [FADDR_W-1:0] fc_fm_raddr;
  logic [FCWA_W-1:0]  fc_w_raddr;
  logic [FCBA_W-1:0]  fc_b_raddr;
  weight_t            fc_w_rdata, fc_b_rdata;

  fc_argmax_engine #(.FADDR_W(FADDR_W), .WADDR_W(FCWA_W), .BADDR_W(FCBA_W)) u_fc (
    .clk, .rst_n, .start(fc_start), .busy(fc_busy), .done(fc_done),
    .class_o, .max_score,
    .fm_re(fc_fm_re), .fm_raddr(fc_fm_raddr), .fm_rdata(FC_FROM_B ? b_rdata : a_rdata),
    .w_re(fc_w_re), .w_raddr(fc_w_raddr), .w_rdata(fc_w_rdata),
    .b_re(fc_b_re), .b_raddr(fc_b_raddr), .b_rdata(fc_b_rdata)
  );

  // ---------------- memories ----------------
  logic   fc_phase;
  assign fc_phase = (state == S_FC_GO) || (state == S_FC_WAIT);
  assign cv_fm_rdata = rd_img ? img_rdata : (rd_a ? a_rdata : b_rdata);

  bram_sdp #(.DEPTH(IMG_WORDS), .WIDTH(NCH*PIX_W), .ADDR_W(FADDR_W)) u_img (
    .clk,
    .we(host_we && host_region == R_IMAGE), .wr_addr(host_ofs), .wr_data(host_wdata[NCH*PIX_W-1:0]),
    .re(cv_fm_re && rd_img), .rd_addr(cv_fm_raddr), .rd_data(img_rdata)
  );

  bram_sdp #(.DEPTH(A_WORDS), .WIDTH(NCH*PIX_W), .ADDR_W(FADDR_W)) u_buf_a (
    .clk,
    .we(cv_we && wr_a), .wr_addr(cv_waddr), .wr_data(cv_wdata),
    .re(fc_phase ? fc_fm_re : (cv_fm_re && rd_a)),
    .rd_addr(fc_phase ? fc_fm_raddr : cv_fm_raddr), .rd_data(a_rdata)
  );

  bram_sdp #(.DEPTH(B_WORDS), .WIDTH(NCH*PIX_W), .ADDR_W(FADDR_W)) u_buf_b (
    .clk,
    .we(cv_we && !wr_a), .wr_addr(cv_waddr), .wr_data(cv_wdata),
    .re(fc_phase ? fc_fm_re : (cv_fm_re && !rd_img && !rd_a)),
    .rd_addr(fc_phase ? fc_fm_raddr : cv_fm_raddr), .rd_data(b_rdata)
  );

  for (genvar c = 0; c < NCH; c++) begin : g_cw
    bram_sdp #(.DEPTH(CW_WORDS), .WIDTH(WGT_W), .ADDR_W(CWA_W)) u_cw (
      .clk,
      .we(host_we && host_region == R_CONV_W && 32'(host_ofs[10:9]) == c),
      .wr_addr(host_ofs[CWA_W-1:0]), .wr_data(host_wdata),
      .re(cv_w_re), .rd_addr(cv_w_raddr), .rd_data(cv_w_rdata[c])
    );
  end

  bram_sdp #(.DEPTH(FCW_WORDS), .WIDTH(WGT_W), .ADDR_W(FCWA_W)) u_fc_w (
    .clk,
    .we(host_we && host_region == R_FC_W), .wr_addr(FCWA_W'(host_ofs)), .wr_data(host_wdata),
    .re(fc_w_re), .rd_addr(fc_w_raddr), .rd_data(fc_w_rdata)
  );

  bram_sdp #(.DEPTH(NCLASS), .WIDTH(WGT_W), .ADDR_W(FCBA_W)) u_fc_b (
    .clk,
    .we(host_we && host_region == R_FC_B), .wr_addr(FCBA_W'(host_ofs)), .wr_data(host_wdata),
    .re(fc_b_re), .rd_addr(fc_b_raddr), .rd_data(fc_b_rdata)
  );

endmodule
