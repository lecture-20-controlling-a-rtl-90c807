// tb_ctrl_table_pkg: the CPU's control table as expected values for the
// controller testbenches. For each instruction it gives the value of every
// control signal and a mask that is 0 where the table has a don't-care.
// Bit order (msb first): RegDst ALUSrc MemtoReg RegWrite MemWrite nPC_sel
// Jump ExtOp ALUctr[1:0], matching cpu_pkg::ctrl_t.
package tb_ctrl_table_pkg;
  typedef enum int {I_ADD, I_SUB, I_ORI, I_LW, I_SW, I_BEQ, I_J, I_NONE} instr_e;

  function automatic void expect_ctrl(instr_e i, output logic [9:0] val, output logic [9:0] mask);
    //                 RegDst ALUSrc MemtoReg RegWr MemWr nPC Jump ExtOp ALUctr
    case (i)
      I_ADD:  begin val = 10'b1_0_0_1_0_0_0_0_00; mask = 10'b1_1_1_1_1_1_1_0_11; end
      I_SUB:  begin val = 10'b1_0_0_1_0_0_0_0_01; mask = 10'b1_1_1_1_1_1_1_0_11; end
      I_ORI:  begin val = 10'b0_1_0_1_0_0_0_0_10; mask = 10'b1_1_1_1_1_1_1_1_11; end
      I_LW:   begin val = 10'b0_1_1_1_0_0_0_1_00; mask = 10'b1_1_1_1_1_1_1_1_11; end
      I_SW:   begin val = 10'b0_1_0_0_1_0_0_1_00; mask = 10'b0_1_0_1_1_1_1_1_11; end
      I_BEQ:  begin val = 10'b0_0_0_0_0_1_0_0_01; mask = 10'b0_1_0_1_1_1_1_0_11; end
      I_J:    begin val = 10'b0_0_0_0_0_0_1_0_00; mask = 10'b0_0_0_1_1_0_1_0_00; end
      default: begin val = 10'b0; mask = 10'b1111111111; end  // unknown: nothing happens
    endcase
  endfunction
endpackage
