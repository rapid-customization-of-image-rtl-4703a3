// scalar_rf: general purpose register file of the processor, NREGS words of
// DW bits. Every move bus can read any register and write any register in
// the same cycle, so the file has NBUS read and NBUS write ports in effect.
// A write takes effect at the end of the cycle; a read in the same cycle
// sees the old value. If two buses write one register in one cycle the
// higher-numbered bus wins (the program is expected not to do this).
//
// The source names a scalar register file; its size, its port count and
// the reset value of zero are this design's choices.
module scalar_rf
  import tta_pkg::*;
#(
  parameter int unsigned NREGS = 16,
  parameter int unsigned NPORT = NBUS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NPORT-1:0]         we,
  input  logic [$clog2(NREGS)-1:0] waddr [NPORT],
  input  logic [DW-1:0]            wdata [NPORT],
  output logic [DW-1:0]            regs  [NREGS]   // all registers, for the read muxes
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      for (int p = 0; p < NPORT; p++)
        if (we[p]) regs[waddr[p]] <= wdata[p];
    end
  end
endmodule
