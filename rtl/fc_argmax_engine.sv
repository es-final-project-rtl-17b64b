// fc_argmax_engine: the classifier head of the card recogniser.
//
// A fully connected (linear) layer f(x) = W x + b maps the flattened
// 10x10x3 feature map to 52 scores, one per playing card, and the index
// of the largest score is returned as the card class 1..52. Softmax, the
// output activation of the described network, turns the scores into a
// probability distribution but keeps their order, so the most probable
// card is the one with the largest score and the exponentials are not
// computed.
//
// Flattening: element i = (y*10 + x)*3 + c of the input vector is channel
// c of feature-map word y*10 + x. Weight of class o, element i sits at
// weight address o*300 + i; the bias of class o at bias address o. Both
// are signed Q16.16; the 8-bit activations are integers, so products and
// bias share the Q16.16 scale and are summed in a 48-bit accumulator.
// One multiply-accumulate per clock: 52*300 clocks plus 2 of pipeline.
// Ties keep the lower class. done pulses for one clock when class_o
// (and max_score) are valid; they hold until the next start.
// From the description: 10x10x3 -> 52 linear layer, classes numbered
// 1..52, 4-byte weights. Own choices: fixed point, bias memory, argmax
// in place of the softmax.
module fc_argmax_engine
  import bjc_pkg::*;
#(
  parameter int unsigned IN_DIM  = FC_DIM,   // edge of the input feature map
  parameter int unsigned NOUT    = NCLASS,   // number of classes
  parameter int unsigned FADDR_W = 17,
  parameter int unsigned WADDR_W = $clog2(NOUT * IN_DIM * IN_DIM * NCH + 1),
  parameter int unsigned BADDR_W = $clog2(NOUT + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               busy,
  output logic               done,
  output class_t             class_o,
  output acc_t               max_score,
  // feature vector read port
  output logic               fm_re,
  output logic [FADDR_W-1:0] fm_raddr,
  input  pixel_t             fm_rdata,
  // weight read port
  output logic               w_re,
  output logic [WADDR_W-1:0] w_raddr,
  input  weight_t            w_rdata,
  // bias read port
  output logic               b_re,
  output logic [BADDR_W-1:0] b_raddr,
  input  weight_t            b_rdata
);
  localparam int unsigned NWORD = IN_DIM * IN_DIM;

  logic                     run;
  logic [$clog2(NOUT)-1:0]  o;
  logic [$clog2(NWORD)-1:0] word;
  logic [1:0]               ch;
  logic [WADDR_W-1:0]       waddr;

  logic last_ch, last_word, last_o;
  assign last_ch   = (ch == 2'(NCH-1));
  assign last_word = (32'(word) == NWORD-1);
  assign last_o    = (32'(o) == NOUT-1);

  assign fm_re    = run;
  assign fm_raddr = FADDR_W'(word);
  assign w_re     = run;
  assign w_raddr  = waddr;
  assign b_re     = run;
  assign b_raddr  = BADDR_W'(o);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; o <= '0; word <= '0; ch <= '0; waddr <= '0;
    end else if (start && !run) begin
      run <= 1'b1; o <= '0; word <= '0; ch <= '0; waddr <= '0;
    end else if (run) begin
      waddr <= waddr + WADDR_W'(1);
      ch    <= last_ch ? 2'd0 : ch + 2'd1;
      if (last_ch) begin
        word <= last_word ? '0 : word + 1'b1;
        if (last_word) begin
          o <= o + 1'b1;
          if (last_o) run <= 1'b0;
        end
      end
    end
  end

  // ---------------- MAC stage ----------------
  logic                    s1_valid, s1_first, s1_last, s1_final;
  logic [1:0]              s1_ch;
  logic [$clog2(NOUT)-1:0] s1_o;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {s1_valid, s1_first, s1_last, s1_final} <= '0;
      s1_ch <= '0; s1_o <= '0;
    end else begin
      s1_valid <= run;
      s1_first <= (word == '0) && (ch == 2'd0);
      s1_last  <= last_word && last_ch;
      s1_final <= last_word && last_ch && last_o;
      s1_ch    <= ch;
      s1_o     <= o;
    end
  end

  acc_t acc, acc_next, prod;
  always_comb begin
    prod     = acc_t'($signed({1'b0, fm_rdata[32'(s1_ch)*PIX_W +: PIX_W]}) * w_rdata);
    acc_next = (s1_first ? acc_t'(b_rdata) : acc) + prod;
  end

  acc_t                    best;
  logic [$clog2(NOUT)-1:0] best_o;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; best <= '0; best_o <= '0; done <= 1'b0;
      class_o <= '0; max_score <= '0;
    end else begin
      done <= 1'b0;
      if (s1_valid) begin
        acc <= acc_next;
        if (s1_last) begin
          if (s1_o == '0 || acc_next > best) begin
            best   <= acc_next;
            best_o <= s1_o;
          end
          if (s1_final) begin
            done <= 1'b1;
            if (s1_o == '0 || acc_next > best) begin
              class_o   <= class_t'(s1_o) + class_t'(1);
              max_score <= acc_next;
            end else begin
              class_o   <= class_t'(best_o) + class_t'(1);
              max_score <= best;
            end
          end
        end
      end
    end
  end

  assign busy = run || s1_valid;
endmodule
