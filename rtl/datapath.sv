// datapath: execution part of the single-cycle CPU.
//
// From the instruction fields Rs<25:21>, Rt<20:16>, Rd<15:11> and
// Imm16<15:0> and the control signals it builds the register transfer of
// one instruction per cycle:
//   RegDst mux    chooses the destination register, rt (0) or rd (1);
//   register file reads busA = R[rs], busB = R[rt];
//   extender      zero- or sign-extends Imm16 (ExtOp);
//   ALUSrc mux    feeds the ALU busB (0) or the extended immediate (1);
//   ALU           ADD / SUB / OR; its Zero output goes to the fetch unit;
//   data memory   address = ALU result, Data In = busB, written if MemWr;
//   MemtoReg mux  writes back the ALU result (0) or the memory word (1)
//                 on busW, stored at the clock edge if RegWr.
// The structure follows the CPU's design; sizes of the memory and the
// register reset are this design's choices. Everything between the clock
// edges is combinational: register and memory writes happen at the edge
// that ends the instruction.
module datapath
  import cpu_pkg::*;
#(
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] instr,
  input  ctrl_t       ctrl,
  output logic        zero
);

  logic [4:0]  rw;
  logic [31:0] busa, busb, busw, ext_imm, alu_b, alu_out, mem_out;

  mux2 #(.W(5)) u_regdst_mux (
    .sel(ctrl.reg_dst), .in0(f_rt(instr)), .in1(f_rd(instr)), .out(rw)
  );

  regfile #(.NREGS(32), .WIDTH(32)) u_regfile (
    .clk  (clk),
    .rst_n(rst_n),
    .ra   (f_rs(instr)),
    .rb   (f_rt(instr)),
    .rw   (rw),
    .busw (busw),
    .regwr(ctrl.reg_write),
    .busa (busa),
    .busb (busb)
  );

  extender u_ext (.imm16(f_imm16(instr)), .extop(ctrl.ext_op), .ext(ext_imm));

  mux2 #(.W(32)) u_alusrc_mux (.sel(ctrl.alu_src), .in0(busb), .in1(ext_imm), .out(alu_b));

  alu #(.WIDTH(32)) u_alu (
    .a(busa), .b(alu_b), .aluctr(ctrl.alu_ctr), .result(alu_out), .zero(zero)
  );

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk(clk), .wren(ctrl.mem_write), .adr(alu_out), .din(busb), .dout(mem_out)
  );

  mux2 #(.W(32)) u_memtoreg_mux (.sel(ctrl.mem_to_reg), .in0(alu_out), .in1(mem_out), .out(busw));

endmodule
