// gcu: global control unit of the processor: instruction memory, program
// counter, jumps and halt.
//
// The program is written into the instruction memory through the prog_*
// port while the processor is stopped. A start pulse sets the program
// counter to 0 and starts execution; one instruction is issued per cycle.
// The instruction memory is read asynchronously, so the instruction at the
// program counter is issued in the same cycle. A move to the jump socket
// makes the written value the next program counter (no delay slots). A move
// to the halt socket stops execution after the current instruction, raises
// done and keeps the moved value as exit_code. While stopped the issued
// instruction is all empty slots.
//
// The source describes the processor as a statically scheduled TCE core
// but not its control unit; all of this block is this design's choice.
module gcu
  import tta_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // program loading
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] prog_addr,
  input  instr_t                        prog_data,
  // control
  input  logic                          start,
  input  logic                          jump_we,
  input  logic [DW-1:0]                 jump_target,
  input  logic                          halt_we,
  input  logic [DW-1:0]                 halt_code,
  // status and issue
  output instr_t                        instr,
  output logic [$clog2(IMEM_DEPTH)-1:0] pc,
  output logic                          running,
  output logic                          done,
  output logic [DW-1:0]                 exit_code
);
  localparam int unsigned PW = $clog2(IMEM_DEPTH);

  instr_t imem [IMEM_DEPTH];

  always_ff @(posedge clk)
    if (prog_we) imem[prog_addr] <= prog_data;

  always_comb begin
    for (int b = 0; b < NBUS; b++)
      instr[b] = '{guard: G_NEVER, src: SOCK_W'(S_IMM), dst: SOCK_W'(D_NONE), imm: '0};
    if (running) instr = imem[pc];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc        <= '0;
      running   <= 1'b0;
      done      <= 1'b0;
      exit_code <= '0;
    end else if (start && !running) begin
      pc      <= '0;
      running <= 1'b1;
      done    <= 1'b0;
    end else if (running) begin
      if (halt_we) begin
        running   <= 1'b0;
        done      <= 1'b1;
        exit_code <= halt_code;
      end
      pc <= jump_we ? jump_target[PW-1:0] : pc + PW'(1);
    end
  end

  always_ff @(posedge clk)
    if (rst_n) assert (!(prog_we && running))
      else $error("gcu: program written while running");
endmodule
