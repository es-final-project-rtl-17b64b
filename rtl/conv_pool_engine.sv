// conv_pool_engine: one convolution layer of the card classifier, fused
// with its ReLU activation and its mean-pooling stage.
//
// The input feature map is square (in_dim x in_dim) with three channels
// packed in one memory word per pixel. Each channel is convolved with its
// own 7x7 kernel (so a layer holds 7*7*3 weights), with zero padding of 3
// so that a convolution output exists for every input pixel. The kernel
// window visits positions row by row, left to right (the "Z" order of the
// description), and the weighted sum is
//     conv[c](y,x) = sum_{ky,kx} in[c](y+ky-3, x+kx-3) * w[c](ky,kx)
// i.e. the window form of the description's algorithm (kernel not
// flipped; a flipped kernel is obtained by storing it flipped).
// The sum is brought back to the 8-bit pixel scale (arithmetic shift by
// the 16 fraction bits of the Q16.16 weights), clamped below at 0 (ReLU)
// and above at 255, and then averaged over non-overlapping pool x pool
// windows (mean pooling, floor division). pool = 1 gives no pooling.
//
// Loop order: output pixel (oy, ox) -> pool position (py, px) -> kernel
// tap (ky, kx). One tap of all three channels is read and multiplied per
// clock, so a layer takes out_dim^2 * pool^2 * 49 clocks plus 3 of
// pipeline. Reads have one clock of latency (bram_sdp); the feature-map
// and weight reads are issued in the same cycle.
//
// Interface: pulse start with in_dim, out_dim (= in_dim / pool), pool and
// layer stable until done. done pulses for one clock together with the
// last output write. Output pixels are written at oy*out_dim + ox.
// From the description: 7x7 per-channel kernels, zero padding, ReLU, mean
// pooling, Z-order scan. Own choices: Q16.16 weights, 8-bit saturated
// activations, fusion of the three steps, one tap per clock.
module conv_pool_engine
  import bjc_pkg::*;
#(
  parameter int unsigned DIM_W   = 10,   // bits of a feature-map edge length
  parameter int unsigned FADDR_W = 17,   // feature-map word address bits
  parameter int unsigned WADDR_W = 9     // weight address bits per channel bank
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [DIM_W-1:0]   in_dim,
  input  logic [DIM_W-1:0]   out_dim,
  input  logic [2:0]         pool,
  input  logic [2:0]         layer,
  output logic               busy,
  output logic               done,
  // input feature map read port
  output logic               fm_re,
  output logic [FADDR_W-1:0] fm_raddr,
  input  pixel_t             fm_rdata,
  // weight read port (same address in all three channel banks)
  output logic               w_re,
  output logic [WADDR_W-1:0] w_raddr,
  input  weight_t            w_rdata [NCH],
  // output feature map write port
  output logic               out_we,
  output logic [FADDR_W-1:0] out_waddr,
  output pixel_t             out_wdata
);
  localparam int unsigned PAD = KSIZE / 2;
  localparam int unsigned SW  = DIM_W + 2;    // signed coordinate width

  // ---------------- issue stage: loop counters ----------------
  logic [DIM_W-1:0] oy, ox;
  logic [2:0]       py, px, ky, kx;
  logic             run;

  logic last_kx, last_ky, last_px, last_py, last_ox, last_oy;
  assign last_kx = (kx == 3'(KSIZE-1));
  assign last_ky = (ky == 3'(KSIZE-1));
  assign last_px = (px == pool - 3'd1);
  assign last_py = (py == pool - 3'd1);
  assign last_ox = (ox == out_dim - DIM_W'(1));
  assign last_oy = (oy == out_dim - DIM_W'(1));

  logic tap_last, pos_last, all_last;
  assign tap_last = last_kx && last_ky;
  assign pos_last = tap_last && last_px && last_py;
  assign all_last = pos_last && last_ox && last_oy;

  // input coordinate of the current tap
  logic signed [SW-1:0] iy, ix;
  logic                 inb;
  always_comb begin
    iy  = $signed({2'b00, DIM_W'(oy * pool)}) + $signed(SW'(py)) + $signed(SW'(ky)) - $signed(SW'(PAD));
    ix  = $signed({2'b00, DIM_W'(ox * pool)}) + $signed(SW'(px)) + $signed(SW'(kx)) - $signed(SW'(PAD));
    inb = (iy >= 0) && (ix >= 0) && (iy < $signed({2'b00, in_dim})) && (ix < $signed({2'b00, in_dim}));
  end

  assign fm_re    = run;
  assign fm_raddr = inb ? FADDR_W'(32'(iy[DIM_W-1:0]) * 32'(in_dim) + 32'(ix[DIM_W-1:0])) : '0;
  assign w_re     = run;
  assign w_raddr  = WADDR_W'(32'(layer) * (KSIZE*KSIZE) + 32'(ky) * KSIZE + 32'(kx));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      {oy, ox} <= '0;
      {py, px, ky, kx} <= '0;
    end else if (start && !run) begin
      run <= 1'b1;
      {oy, ox} <= '0;
      {py, px, ky, kx} <= '0;
    end else if (run) begin
      kx <= last_kx ? 3'd0 : kx + 3'd1;
      if (last_kx) begin
        ky <= last_ky ? 3'd0 : ky + 3'd1;
        if (last_ky) begin
          px <= last_px ? 3'd0 : px + 3'd1;
          if (last_px) begin
            py <= last_py ? 3'd0 : py + 3'd1;
            if (last_py) begin
              ox <= last_ox ? '0 : ox + DIM_W'(1);
              if (last_ox) oy <= last_oy ? '0 : oy + DIM_W'(1);
            end
          end
        end
      end
      if (all_last) run <= 1'b0;
    end
  end

  // ---------------- MAC stage (data of the issued tap arrives) ----------------
  logic               s1_valid, s1_inb, s1_tap_first, s1_tap_last;
  logic               s1_pos_first, s1_pos_last, s1_all_last;
  logic [FADDR_W-1:0] s1_oaddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      {s1_inb, s1_tap_first, s1_tap_last, s1_pos_first, s1_pos_last, s1_all_last} <= '0;
      s1_oaddr <= '0;
    end else begin
      s1_valid     <= run;
      s1_inb       <= inb;
      s1_tap_first <= (kx == 3'd0) && (ky == 3'd0);
      s1_tap_last  <= tap_last;
      s1_pos_first <= (px == 3'd0) && (py == 3'd0);
      s1_pos_last  <= pos_last;
      s1_all_last  <= all_last;
      s1_oaddr     <= FADDR_W'(32'(oy) * 32'(out_dim) + 32'(ox));
    end
  end

  acc_t           acc      [NCH];
  acc_t           acc_next [NCH];
  logic [13:0]    psum     [NCH];
  logic [13:0]    psum_next[NCH];
  chan_t          act      [NCH];
  chan_t          mean     [NCH];

  always_comb begin
    for (int c = 0; c < NCH; c++) begin
      acc_t prod, shifted;
      prod = s1_inb ? acc_t'($signed({1'b0, fm_rdata[c*PIX_W +: PIX_W]}) * w_rdata[c]) : '0;
      acc_next[c] = (s1_tap_first ? '0 : acc[c]) + prod;
      shifted = acc_next[c] >>> WGT_FRAC;
      if (shifted < 0)        act[c] = '0;
      else if (shifted > 255) act[c] = 8'd255;
      else                    act[c] = shifted[PIX_W-1:0];
      psum_next[c] = (s1_pos_first ? 14'd0 : psum[c]) + 14'(act[c]);
      unique case (pool)
        3'd2:    mean[c] = PIX_W'(psum_next[c] >> 2);
        3'd3:    mean[c] = PIX_W'(psum_next[c] / 14'd9);
        3'd4:    mean[c] = PIX_W'(psum_next[c] >> 4);
        3'd5:    mean[c] = PIX_W'(psum_next[c] / 14'd25);
        3'd6:    mean[c] = PIX_W'(psum_next[c] / 14'd36);
        3'd7:    mean[c] = PIX_W'(psum_next[c] / 14'd49);
        default: mean[c] = PIX_W'(psum_next[c]);
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (s1_valid) begin
      for (int c = 0; c < NCH; c++) begin
        acc[c] <= acc_next[c];
        if (s1_tap_last) psum[c] <= psum_next[c];
      end
    end
  end

  // ---------------- output stage ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_we    <= 1'b0;
      out_waddr <= '0;
      out_wdata <= '0;
      done      <= 1'b0;
    end else begin
      out_we <= s1_valid && s1_pos_last;
      done   <= s1_valid && s1_all_last;
      if (s1_valid && s1_pos_last) begin
        out_waddr <= s1_oaddr;
        out_wdata <= {mean[2], mean[1], mean[0]};
      end
    end
  end

  assign busy = run || s1_valid;
endmodule
