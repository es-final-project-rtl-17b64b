// display_logic: turns the card-counting score into the contents of the
// six-digit display buffer.
//
// The buffer holds six 4-bit codes, digit i in disp_buf[4*i +: 4]:
//   digits 0..2  instruction letters: "PLy" (play) when score >= PLAY_MIN,
//                otherwise "HLd" (hold, i.e. wait)
//   digits 3..5  the score in decimal, hundreds first. A negative score
//                shows a minus sign in place of the hundreds digit.
// The magnitude is clamped to 999 (positive) or 99 (negative) and
// converted with double_dabble. The block converts continuously: it
// captures the score, converts it in BIN_W + 1 clocks and writes the
// buffer, then starts again, so a new score appears within
// 2*(BIN_W + 3) clocks. The buffer is 0 ("000000") after reset until the
// first conversion ends.
// From the description: 3 letters and 3 decimal digits of 4 bits each,
// double dabble. Own choices: the letters, the play threshold and the
// treatment of negative scores.
module display_logic
  import bjc_pkg::*;
#(
  parameter int unsigned SCORE_W  = 16,
  parameter int          PLAY_MIN = 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic signed [SCORE_W-1:0] score,
  output logic [23:0]               disp_buf,
  output logic                      updated      // pulses when disp_buf is written
);
  localparam int unsigned BIN_W = 10;

  logic                    dd_start, dd_busy, dd_done;
  logic [BIN_W-1:0]        mag;
  logic [11:0]             bcd;
  logic                    neg_q, play_q;

  // clamp |score| to what three digits (or a sign and two) can show
  logic [BIN_W-1:0] mag_c;
  always_comb begin
    if (score < 0) mag_c = (-score > 99)  ? BIN_W'(99)  : BIN_W'(-score);
    else           mag_c = (score > 999)  ? BIN_W'(999) : BIN_W'(score);
  end

  typedef enum logic [1:0] {D_START, D_WAIT} dstate_e;
  dstate_e st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_START; mag <= '0; neg_q <= 1'b0; play_q <= 1'b0;
      disp_buf <= '0; updated <= 1'b0;
    end else begin
      updated <= 1'b0;
      unique case (st)
        D_START: begin
          mag    <= mag_c;
          neg_q  <= score < 0;
          play_q <= 32'(score) >= PLAY_MIN;
          st     <= D_WAIT;
        end
        D_WAIT: if (dd_done) begin
          disp_buf[3:0]   <= play_q ? G_P : G_H;
          disp_buf[7:4]   <= G_L;
          disp_buf[11:8]  <= play_q ? G_Y : G_D;
          disp_buf[15:12] <= neg_q ? G_MINUS : bcd[11:8];
          disp_buf[19:16] <= bcd[7:4];
          disp_buf[23:20] <= bcd[3:0];
          updated <= 1'b1;
          st <= D_START;
        end
        default: st <= D_START;
      endcase
    end
  end

  // start the converter the clock after the score is captured
  logic start_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) start_q <= 1'b0;
    else        start_q <= (st == D_START);
  end
  assign dd_start = start_q;

  double_dabble #(.BIN_W(BIN_W), .DIGITS(3)) u_dd (
    .clk, .rst_n, .start(dd_start), .bin(mag), .busy(dd_busy), .done(dd_done), .bcd
  );
endmodule
