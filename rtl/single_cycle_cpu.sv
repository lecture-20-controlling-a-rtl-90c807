// single_cycle_cpu: a single-cycle processor for a MIPS subset.
//
// Executes add, sub, ori, lw, sw, beq and j, one instruction per clock
// cycle. The instruction fetch unit presents the instruction at the PC; the
// controller decodes its opcode and funct into the control signals; the
// datapath reads registers, computes in the ALU, accesses data memory and
// prepares the write-back; at the rising clock edge the register file, the
// data memory and the PC are all updated together. The ALU's Zero flag goes
// back to the fetch unit to decide a beq.
// Interface: clk; rst_n (active low, synchronous; PC and registers to 0);
// prog_we / prog_addr / prog_wdata load instruction words (this design's
// own port, used while rst_n is low); pc, instr and ctrl show the current
// instruction and its control signals.
module single_cycle_cpu
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_wdata,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output ctrl_t       ctrl
);

  logic zero;

  ifu #(.IMEM_WORDS(IMEM_WORDS)) u_ifu (
    .clk       (clk),
    .rst_n     (rst_n),
    .npc_sel   (ctrl.npc_sel),
    .zero      (zero),
    .jump      (ctrl.jump),
    .prog_we   (prog_we),
    .prog_addr (prog_addr),
    .prog_wdata(prog_wdata),
    .pc        (pc),
    .instr     (instr)
  );

  controller u_ctrl (.op(f_op(instr)), .funct(f_funct(instr)), .ctrl(ctrl));

  datapath #(.DMEM_WORDS(DMEM_WORDS)) u_dp (
    .clk  (clk),
    .rst_n(rst_n),
    .instr(instr),
    .ctrl (ctrl),
    .zero (zero)
  );

endmodule
