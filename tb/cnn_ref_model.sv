// cnn_ref_model: reference model of the card classifier for testbenches
// (instantiate it and call its functions hierarchically). It computes the
// network independently of the RTL, from its definition: per-channel
// 7x7 zero-padded window sums with Q16.16 weights, shift by 16, clamp to
// 0..255, floor mean over pool x pool windows, then scores W x + b over
// the 10x10x3 vector and the first largest score. It also makes random
// weights and images, and counts how often padding, ReLU clamping and
// saturation occur and which pooling factors were used.
module cnn_ref_model #(
  parameter int unsigned IMG_DIM  = 300,
  parameter int unsigned POOL [6] = '{2, 3, 5, 1, 1, 1}
) ();
  int          dims [7];
  int          img  [IMG_DIM * IMG_DIM * 3];   // [(y*d+x)*3 + c]
  int          cw   [3][294];                  // [c][l*49 + ky*7 + kx]
  int          fw   [15600];                   // [o*300 + (y*10+x)*3 + c]
  int          fb   [52];
  int          n_pad, n_relu, n_sat;
  int          pool_used [8];
  longint      scores [52];
  int          best_class;
  longint      best_score;

  initial begin
    dims[0] = IMG_DIM;
    for (int l = 0; l < 6; l++) dims[l+1] = dims[l] / POOL[l];
  end

  function automatic void new_image();
    foreach (img[i]) img[i] = $urandom_range(0, 255);
  endfunction

  function automatic void new_weights();
    for (int c = 0; c < 3; c++)
      for (int k = 0; k < 294; k++) cw[c][k] = int'($urandom_range(0, 16384)) - 6554;
    foreach (fw[i]) fw[i] = int'($urandom_range(0, 4000)) - 2000;
    foreach (fb[i]) fb[i] = int'($urandom_range(0, 400000)) - 200000;
  endfunction

  function automatic void run();
    int cur [];
    int nxt [];
    cur = new[IMG_DIM * IMG_DIM * 3];
    foreach (img[i]) cur[i] = img[i];
    n_pad = 0; n_relu = 0; n_sat = 0;
    foreach (pool_used[i]) pool_used[i] = 0;
    for (int l = 0; l < 6; l++) begin
      int d, od, p;
      d = dims[l]; od = dims[l+1]; p = POOL[l];
      pool_used[p]++;
      nxt = new[od * od * 3];
      for (int oy = 0; oy < od; oy++)
        for (int ox = 0; ox < od; ox++)
          for (int c = 0; c < 3; c++) begin
            int s;
            s = 0;
            for (int py = 0; py < p; py++)
              for (int px = 0; px < p; px++) begin
                longint acc, sh;
                int y, x;
                y = oy * p + py; x = ox * p + px;
                acc = 0;
                for (int ky = 0; ky < 7; ky++)
                  for (int kx = 0; kx < 7; kx++) begin
                    int iy, ix;
                    iy = y + ky - 3; ix = x + kx - 3;
                    if (iy < 0 || ix < 0 || iy >= d || ix >= d) n_pad++;
                    else acc += longint'(cur[(iy*d+ix)*3 + c]) * longint'(cw[c][l*49 + ky*7 + kx]);
                  end
                sh = acc >>> 16;
                if (sh < 0) begin sh = 0; n_relu++; end
                else if (sh > 255) begin sh = 255; n_sat++; end
                s += int'(sh);
              end
            nxt[(oy*od+ox)*3 + c] = s / (p * p);
          end
      cur = nxt;
    end
    for (int o = 0; o < 52; o++) begin
      scores[o] = longint'(fb[o]);
      for (int i = 0; i < 300; i++) scores[o] += longint'(cur[i]) * longint'(fw[o*300 + i]);
    end
    best_class = 1; best_score = scores[0];
    for (int o = 1; o < 52; o++) if (scores[o] > best_score) begin best_score = scores[o]; best_class = o + 1; end
  endfunction

  // clocks the RTL needs for the six layers (without per-layer overhead)
  function automatic longint conv_clocks();
    longint n;
    n = 0;
    for (int l = 0; l < 6; l++) n += longint'(dims[l+1]) * dims[l+1] * POOL[l] * POOL[l] * 49;
    return n;
  endfunction
endmodule
