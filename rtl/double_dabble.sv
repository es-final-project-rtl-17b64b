// double_dabble: binary to packed-BCD conversion by shift-and-add-3.
//
// The binary value is shifted left into a BCD register one bit per clock;
// before each shift every BCD digit of 5 or more gets 3 added, so that
// the shift carries it correctly into the next decimal digit. After BIN_W
// shifts the register holds the decimal digits of the input.
// Interface: pulse start with bin valid (bin is captured); done pulses
// one clock after the last shift, BIN_W + 1 clocks after start, and bcd
// holds the result (digit 0 = units in bcd[3:0]) until the next start.
// A value that needs more than DIGITS digits is reduced modulo 10^DIGITS.
// The algorithm is the one the display interface names; the sequential
// one-bit-per-clock form is this design's choice.
module double_dabble #(
  parameter int unsigned BIN_W  = 10,
  parameter int unsigned DIGITS = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [BIN_W-1:0]      bin,
  output logic                  busy,
  output logic                  done,
  output logic [4*DIGITS-1:0]   bcd
);
  logic [BIN_W-1:0]          sh;
  logic [4*DIGITS-1:0]       acc, adj;
  logic [$clog2(BIN_W+1)-1:0] cnt;

  always_comb begin
    adj = acc;
    for (int d = 0; d < DIGITS; d++)
      if (acc[4*d +: 4] >= 4'd5) adj[4*d +: 4] = acc[4*d +: 4] + 4'd3;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; acc <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0; bcd <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        sh   <= bin;
        acc  <= '0;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        acc <= {adj[4*DIGITS-2:0], sh[BIN_W-1]};
        sh  <= sh << 1;
        cnt <= cnt + 1'b1;
        if (32'(cnt) == BIN_W - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          bcd  <= {adj[4*DIGITS-2:0], sh[BIN_W-1]};
        end
      end
    end
  end
endmodule
