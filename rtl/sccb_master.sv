// sccb_master: writes one camera register over the two-wire serial camera
// control bus (SCCB, the camera's I2C-like configuration interface).
//
// A write is a 3-phase transmission: start condition, device ID byte,
// register address byte, data byte, stop condition. Each byte is followed
// by a ninth "don't care" bit during which the master releases SDA. Bits
// go out MSB first; SDA changes while SCL is low and is stable while SCL
// is high. Each bit lasts four quarter periods of CLK_HZ / (4*SCL_HZ)
// system clocks. SCL is driven by the master; SDA is open drain: sda_oe=1
// pulls the line low, sda_oe=0 lets the pull-up make it high.
// Interface: pulse start with dev_id, reg_addr, data (captured); busy is
// high until done pulses after the stop condition, 4*(1+27+1) quarter
// periods later. The camera's answer in the ninth bits is not checked.
// From the description: the SCL/SDA pins and the register writes they
// carry. Own choices: the bit rate and the unchecked acknowledge.
module sccb_master #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned SCL_HZ = 100_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] dev_id,
  input  logic [7:0] reg_addr,
  input  logic [7:0] data,
  output logic       busy,
  output logic       done,
  output logic       scl,
  output logic       sda_oe
);
  localparam int unsigned QDIV = (CLK_HZ / (4 * SCL_HZ) > 0) ? CLK_HZ / (4 * SCL_HZ) : 1;
  localparam int unsigned NBIT = 27;

  typedef enum logic [1:0] {P_IDLE, P_START, P_BITS, P_STOP} phase_e;
  phase_e                      ph;
  logic [1:0]                  q;       // quarter within the current symbol
  logic [$clog2(QDIV+1)-1:0]   div;
  logic [NBIT-1:0]             sh;      // bits still to send, MSB first
  logic [4:0]                  nbit;
  logic                        sda;     // wanted line level
  logic                        tick;

  assign tick = (32'(div) == QDIV - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= P_IDLE; q <= '0; div <= '0; sh <= '0; nbit <= '0;
      scl <= 1'b1; sda <= 1'b1; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (ph == P_IDLE) begin
        scl <= 1'b1; sda <= 1'b1; div <= '0; q <= '0;
        if (start) begin
          sh <= {dev_id, 1'b1, reg_addr, 1'b1, data, 1'b1};
          ph <= P_START;
        end
      end else begin
        div <= tick ? '0 : div + 1'b1;
        if (tick) begin
          q <= q + 2'd1;
          unique case (ph)
            P_START: begin
              // SDA falls while SCL is high, then SCL falls
              unique case (q)
                2'd0: begin scl <= 1'b1; sda <= 1'b1; end
                2'd1: sda <= 1'b0;
                2'd2: sda <= 1'b0;
                default: begin scl <= 1'b0; ph <= P_BITS; nbit <= '0; end
              endcase
            end
            P_BITS: begin
              unique case (q)
                2'd0: sda <= sh[NBIT-1];
                2'd1: scl <= 1'b1;
                2'd2: scl <= 1'b1;
                default: begin
                  scl <= 1'b0;
                  sh  <= sh << 1;
                  nbit <= nbit + 5'd1;
                  if (32'(nbit) == NBIT - 1) ph <= P_STOP;
                end
              endcase
            end
            default: begin   // P_STOP: SDA rises while SCL is high
              unique case (q)
                2'd0: sda <= 1'b0;
                2'd1: scl <= 1'b1;
                2'd2: sda <= 1'b1;
                default: begin ph <= P_IDLE; done <= 1'b1; end
              endcase
            end
          endcase
        end
      end
    end
  end

  assign sda_oe = !sda;
  assign busy   = (ph != P_IDLE);
endmodule
