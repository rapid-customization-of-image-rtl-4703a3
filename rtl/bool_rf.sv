// bool_rf: boolean register file of the processor, NREGS one-bit registers.
// A move to a boolean register stores bit 0 of the moved word, typically
// the 0/1 result of an ALU comparison. The registers drive the guards that
// make a move conditional (B0 true / B0 false) and can also be read as
// zero-extended words. Writes take effect at the end of the cycle.
//
// The source names a boolean register file; two registers, their use as
// guards and the reset value of false are this design's choices.
module bool_rf
  import tta_pkg::*;
#(
  parameter int unsigned NREGS = 2,
  parameter int unsigned NPORT = NBUS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NPORT-1:0]         we,
  input  logic [$clog2(NREGS)-1:0] waddr [NPORT],
  input  logic [DW-1:0]            wdata [NPORT],
  output logic [NREGS-1:0]         b
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b <= '0;
    end else begin
      for (int p = 0; p < NPORT; p++)
        if (we[p]) b[waddr[p]] <= wdata[p][0];
    end
  end
endmodule
