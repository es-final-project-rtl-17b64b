// bram_sdp: simple dual-port on-chip RAM (one write port, one read port).
//
// Used for every on-chip buffer of the card counter: the pre-processed
// image, the two feature-map buffers and the CNN weights. Writes take
// effect at the clock edge; a read returns the word at rd_addr one clock
// after it is presented (registered output, as block RAM does). A read of
// the address being written in the same cycle returns the old word.
// Contents are not reset. The memory itself follows the description of
// on-chip buffers; the single-cycle registered read is this design's choice.
module bram_sdp #(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [WIDTH-1:0]  wr_data,
  input  logic              re,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [WIDTH-1:0]  rd_data
);
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && 32'(wr_addr) < DEPTH) mem[IW'(wr_addr)] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (re) rd_data <= (32'(rd_addr) < DEPTH) ? mem[IW'(rd_addr)] : '0;
  end
endmodule
