// ifu: instruction fetch unit of the single-cycle CPU.
//
// Holds the program counter, fetches Instruction = MEM[PC] from the
// instruction memory and, at every rising clock edge, loads the next PC:
//   - PC + 4                               normally ("+4");
//   - PC + 4 + {SignExt(imm16), 00}        when nPC_sel AND Zero (a beq whose
//                                          registers are equal);
//   - {PC[31:28], target26, 00}            when Jump.
// nPC_sel means "this is a branch instruction"; it is ANDed with the ALU's
// Zero to steer the branch mux, and the jump mux after it takes precedence.
// The PC's two low bits are always 00, so only PC[31:2] is stored. All of
// this follows the CPU's design; the synchronous active-low reset to PC = 0
// and the instruction-memory load port are this design's own.
// Timing: instr and pc are valid combinationally during the cycle; npc_sel,
// zero and jump must settle before the clock edge that ends the cycle.
module ifu
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        npc_sel,
  input  logic        zero,
  input  logic        jump,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_wdata,
  output logic [31:0] pc,
  output logic [31:0] instr
);

  logic [31:2] pc_q;
  logic [31:0] pc_plus4, br_offset, br_target, npc_br, jump_target, npc;
  logic        npc_mux_sel;

  assign pc = {pc_q, 2'b00};

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk  (clk),
    .addr (pc),
    .rdata(instr),
    .we   (prog_we),
    .waddr(prog_addr),
    .wdata(prog_wdata)
  );

  // Next-address logic
  assign pc_plus4    = pc + 32'd4;
  assign br_offset   = {{14{instr[15]}}, f_imm16(instr), 2'b00};  // PC Ext
  assign br_target   = pc_plus4 + br_offset;
  assign npc_mux_sel = npc_sel & zero;
  assign jump_target = {pc[31:28], f_target(instr), 2'b00};

  mux2 #(.W(32)) u_br_mux   (.sel(npc_mux_sel), .in0(pc_plus4), .in1(br_target),   .out(npc_br));
  mux2 #(.W(32)) u_jump_mux (.sel(jump),        .in0(npc_br),   .in1(jump_target), .out(npc));

  always_ff @(posedge clk) begin
    if (!rst_n) pc_q <= '0;
    else        pc_q <= npc[31:2];
  end

endmodule
