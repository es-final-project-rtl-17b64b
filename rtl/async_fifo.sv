// async_fifo: small first-in first-out buffer between two unrelated
// clocks, used to carry camera bytes from the pixel clock into the system
// clock.
//
// Classic dual-clock design: binary read and write pointers with one
// extra wrap bit, converted to Gray code and passed to the other side
// through two flip-flops. The write side compares its pointer with the
// synchronised read pointer to produce full; the read side compares with
// the synchronised write pointer to produce empty. Both flags are
// pessimistic (they may stay set a few clocks longer than needed), never
// optimistic. DEPTH must be a power of two, at least 4.
// Write: wr_en with wr_data when !full. Read: rd_data shows the oldest
// entry whenever !empty (first-word fall-through); rd_en pops it.
// Each side has its own asynchronous active-low reset, which must be
// asserted together. This block is this design's own; the description
// only gives the camera's byte stream and pixel clock.
module async_fifo #(
  parameter int unsigned WIDTH = 10,
  parameter int unsigned DEPTH = 16
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, rbin, wgray, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side ----------------
  logic [AW:0] wbin_next;
  assign wbin_next = wbin + (AW+1)'(1);
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !full) begin
        wbin  <= wbin_next;
        wgray <= bin2gray(wbin_next);
      end
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  // ---------------- read side ----------------
  logic [AW:0] rbin_next;
  assign rbin_next = rbin + (AW+1)'(1);
  assign empty   = (rgray == wgray_r2);
  assign rd_data = mem[rbin[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !empty) begin
        rbin  <= rbin_next;
        rgray <= bin2gray(rbin_next);
      end
    end
  end
endmodule
