// camera_config: the camera control register block. On request it writes
// the camera's register settings, one SCCB register write each.
//
// The settings table (register address, value) defaults to the two
// settings the design needs:
//   COM7  (0x12) = 0x04   output format RGB (COM7[2]=1, COM7[0]=0)
//   COM14 (0x3E) = 0x14   COM14[4]=1 scaled PCLK, COM14[2:0]=100: PCLK/16
// The camera's SCCB write ID is DEV_ID (0x42 for the OV7670).
// Interface: pulse start; busy stays high while the writes run; done
// pulses once after the last write. Each write takes 4*29 SCL quarter
// periods of sccb_master.
// From the description: the two registers and their values, written over
// the serial interface. Own choices: the table form, DEV_ID and sequencing.
module camera_config #(
  parameter int unsigned    CLK_HZ        = 50_000_000,
  parameter int unsigned    SCL_HZ        = 100_000,
  parameter logic [7:0]     DEV_ID        = 8'h42,
  parameter int unsigned    NREG          = 2,
  parameter logic [15:0]    REGS [NREG]   = '{16'h12_04, 16'h3E_14}
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic busy,
  output logic done,
  output logic scl,
  output logic sda_oe
);
  logic [$clog2(NREG+1)-1:0] idx;
  logic                      run, go, wr_busy, wr_done;
  logic [15:0]               entry;

  always_comb begin
    entry = '0;
    for (int i = 0; i < NREG; i++) if (32'(idx) == i) entry = REGS[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; go <= 1'b0; idx <= '0; done <= 1'b0;
    end else begin
      go   <= 1'b0;
      done <= 1'b0;
      if (start && !run) begin
        run <= 1'b1; idx <= '0; go <= 1'b1;
      end else if (run && wr_done) begin
        if (32'(idx) == NREG - 1) begin
          run  <= 1'b0;
          done <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
          go  <= 1'b1;
        end
      end
    end
  end

  assign busy = run;

  sccb_master #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ)) u_sccb (
    .clk, .rst_n, .start(go), .dev_id(DEV_ID), .reg_addr(entry[15:8]), .data(entry[7:0]),
    .busy(wr_busy), .done(wr_done), .scl, .sda_oe
  );
endmodule
