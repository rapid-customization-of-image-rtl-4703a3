// lsu_fu: load-store unit with the processor's data memory.
// Operations (selected by the trigger address): LDW (load 32-bit word),
// LDQU (load byte, zero-extended), STW (store word), STQ (store byte).
//
// Port 1 (din[0], trigger) is the byte address; port 2 is an operand
// register holding the store data (used directly if written in the trigger
// cycle). Words are little-endian and a word access ignores the two low
// address bits. The memory is read synchronously, so a load result is
// readable from the cycle after the trigger and holds until the next load.
// A second, host port (word addressed, 1-cycle read latency) lets the
// system load images and read results while the processor is stopped; it
// must not be used in a cycle in which the processor triggers the LSU.
//
// The source only names a load-store unit. Memory size, byte addressing,
// latency and the host port are this design's choices; the default size
// holds the three colour planes of a 512x512 input and output image.
module lsu_fu
  import tta_pkg::*;
#(
  parameter int unsigned DMEM_BYTES = 2097152
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [1:0]    we,          // [0] trigger, [1] store data
  input  lsu_op_e       opc,         // valid with we[0]
  input  logic [DW-1:0] din [2],
  output logic [DW-1:0] r,
  // host port
  input  logic                          host_en,
  input  logic                          host_we,
  input  logic [$clog2(DMEM_BYTES)-3:0] host_addr,
  input  logic [DW-1:0]                 host_wdata,
  output logic [DW-1:0]                 host_rdata
);
  localparam int unsigned WORDS = DMEM_BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [DW-1:0] mem [WORDS];
  logic [DW-1:0] sdata_q, sdata, rword_q;
  logic [1:0]    lane_q;
  logic          byte_q;

  logic [AW-1:0] addr;
  logic [3:0]    be;
  logic [DW-1:0] wdata;
  logic          wr;

  always_comb begin
    sdata = we[1] ? din[1] : sdata_q;
    addr  = we[0] ? din[0][AW+1:2] : host_addr;
    wr    = 1'b0;
    be    = 4'b0000;
    wdata = host_wdata;
    if (we[0]) begin
      unique case (opc)
        LSU_STW: begin wr = 1'b1; be = 4'b1111; wdata = sdata; end
        LSU_STQ: begin
          wr    = 1'b1;
          be    = 4'b0001 << din[0][1:0];
          wdata = {4{sdata[7:0]}};
        end
        default: ;
      endcase
    end else if (host_en && host_we) begin
      wr = 1'b1;
      be = 4'b1111;
    end
  end

  // single-port memory with byte enables and registered read
  always_ff @(posedge clk) begin
    if (wr)
      for (int i = 0; i < 4; i++)
        if (be[i]) mem[addr][8*i +: 8] <= wdata[8*i +: 8];
    if ((we[0] && (opc == LSU_LDW || opc == LSU_LDQU)) || (host_en && !host_we))
      rword_q <= mem[addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sdata_q <= '0;
      lane_q  <= '0;
      byte_q  <= 1'b0;
    end else begin
      if (we[1]) sdata_q <= din[1];
      if (we[0] && (opc == LSU_LDW || opc == LSU_LDQU)) begin
        lane_q <= din[0][1:0];
        byte_q <= (opc == LSU_LDQU);
      end
    end
  end

  // The load result stays valid until the next load because the memory
  // output register only changes on a load (or a host read).
  always_comb begin
    if (byte_q) r = {24'd0, rword_q[8*lane_q +: 8]};
    else        r = rword_q;
  end
  assign host_rdata = rword_q;

  // the host port and the processor must not use the memory together
  always_ff @(posedge clk)
    if (rst_n) assert (!(we[0] && host_en))
      else $error("lsu_fu: host access in a cycle with an LSU trigger");
endmodule
