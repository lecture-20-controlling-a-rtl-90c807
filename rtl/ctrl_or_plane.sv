// ctrl_or_plane: the OR plane of the main controller.
//
// Each control signal is the OR of the instruction lines that need it high,
// with the don't-care entries of the control table resolved to 0:
//   RegDst = add+sub          ALUSrc   = ori+lw+sw    MemtoReg   = lw
//   RegWrite = add+sub+ori+lw MemWrite = sw           nPC_sel    = beq
//   Jump = jump               ExtOp    = lw+sw
//   ALUctr[0] = sub+beq       ALUctr[1] = ori   (00 ADD, 01 SUB, 10 OR)
// These equations are the controller's as designed; the 2-bit ALUctr is the
// encoding that goes with them. Purely combinational.
module ctrl_or_plane
  import cpu_pkg::*;
(
  input  terms_t terms,
  output ctrl_t  ctrl
);

  always_comb begin
    ctrl.reg_dst    = terms.add | terms.sub;
    ctrl.alu_src    = terms.ori | terms.lw | terms.sw;
    ctrl.mem_to_reg = terms.lw;
    ctrl.reg_write  = terms.add | terms.sub | terms.ori | terms.lw;
    ctrl.mem_write  = terms.sw;
    ctrl.npc_sel    = terms.beq;
    ctrl.jump       = terms.jump;
    ctrl.ext_op     = terms.lw | terms.sw;
    ctrl.alu_ctr    = aluctr_e'({terms.ori, terms.sub | terms.beq});
  end

endmodule
