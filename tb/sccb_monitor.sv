// sccb_monitor: decodes SCCB (two-wire) write transactions seen on SCL and
// an open-drain SDA for testbenches. Bits are sampled at SCL rising edges;
// a start condition (SDA falling while SCL is high) begins a transaction,
// a stop condition (SDA rising while SCL is high) ends it. Each completed
// transaction of 27 bits (plus the SCL rise of the stop condition) is split into three bytes and their ninth bits.
module sccb_monitor (
  input  logic scl,
  input  logic sda_oe
);
  logic sda;
  assign sda = !sda_oe;   // pull-up when released

  int          ntrans = 0;       // complete transactions seen
  int          nbad   = 0;       // transactions that were not 27 bits
  logic [7:0]  dev   [16];
  logic [7:0]  regs  [16];
  logic [7:0]  vals  [16];
  logic [2:0]  ninth [16];
  logic [27:0] bits;
  int          nbits;
  bit          active = 0;

  always @(negedge sda) if (scl) begin active = 1; nbits = 0; bits = '0; end
  always @(posedge scl) if (active) begin bits = {bits[26:0], sda}; nbits++; end
  always @(posedge sda) if (scl && active) begin
    active = 0;
    if (nbits == 28 && ntrans < 16) begin
      dev[ntrans]   = bits[27:20];
      ninth[ntrans] = {bits[19], bits[10], bits[1]};
      regs[ntrans]  = bits[18:11];
      vals[ntrans]  = bits[9:2];
      ntrans++;
    end else nbad++;
  end
endmodule
