// cpu_pkg: types and constants shared by the single-cycle CPU.
//
// The instruction subset is add, sub, ori, lw, sw, beq and j of the MIPS
// instruction set, in the three formats R (op rs rt rd shamt funct),
// I (op rs rt imm16) and J (op target26). The opcode and funct values and
// the control-signal set are the ones of the CPU's control table. The 2-bit
// ALUctr encoding (00 ADD, 01 SUB, 10 OR) follows the controller's logic
// equations; the struct layouts are this design's own.
package cpu_pkg;

  // Opcodes, instruction[31:26]
  localparam logic [5:0] OP_RTYPE = 6'b00_0000;
  localparam logic [5:0] OP_ORI   = 6'b00_1101;
  localparam logic [5:0] OP_LW    = 6'b10_0011;
  localparam logic [5:0] OP_SW    = 6'b10_1011;
  localparam logic [5:0] OP_BEQ   = 6'b00_0100;
  localparam logic [5:0] OP_J     = 6'b00_0010;

  // Function codes of the R-type instructions, instruction[5:0]
  localparam logic [5:0] FN_ADD = 6'b10_0000;
  localparam logic [5:0] FN_SUB = 6'b10_0010;

  // ALU operation
  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_OR  = 2'b10
  } aluctr_e;

  // Instruction lines leaving the controller's AND plane (one-hot or none)
  typedef struct packed {
    logic add;
    logic sub;
    logic ori;
    logic lw;
    logic sw;
    logic beq;
    logic jump;
  } terms_t;

  // Control signals leaving the controller's OR plane
  typedef struct packed {
    logic    reg_dst;    // 0: write rt, 1: write rd
    logic    alu_src;    // 0: busB, 1: extended immediate
    logic    mem_to_reg; // 0: ALU result, 1: memory data
    logic    reg_write;  // write the register file
    logic    mem_write;  // write the data memory
    logic    npc_sel;    // branch instruction ("br"), else "+4"
    logic    jump;       // jump instruction
    logic    ext_op;     // 0: zero-extend, 1: sign-extend
    aluctr_e alu_ctr;
  } ctrl_t;

  // Instruction field helpers
  function automatic logic [5:0]  f_op    (logic [31:0] i); return i[31:26]; endfunction
  function automatic logic [4:0]  f_rs    (logic [31:0] i); return i[25:21]; endfunction
  function automatic logic [4:0]  f_rt    (logic [31:0] i); return i[20:16]; endfunction
  function automatic logic [4:0]  f_rd    (logic [31:0] i); return i[15:11]; endfunction
  function automatic logic [15:0] f_imm16 (logic [31:0] i); return i[15:0];  endfunction
  function automatic logic [25:0] f_target(logic [31:0] i); return i[25:0];  endfunction
  function automatic logic [5:0]  f_funct (logic [31:0] i); return i[5:0];   endfunction

endpackage
