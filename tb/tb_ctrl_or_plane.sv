// tb_ctrl_or_plane: raises each instruction line alone (and none) and
// checks the control signals against the control table, skipping the
// table's don't-care entries.
module tb_ctrl_or_plane;
  import cpu_pkg::*;
  import tb_ctrl_table_pkg::*;
  terms_t     terms;
  ctrl_t      ctrl;
  logic [9:0] val, mask;
  int checks = 0, failures = 0;

  ctrl_or_plane dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i <= int'(I_NONE); i++) begin
      terms = '0;
      case (instr_e'(i))
        I_ADD: terms.add = 1;  I_SUB: terms.sub = 1;  I_ORI: terms.ori = 1;
        I_LW:  terms.lw  = 1;  I_SW:  terms.sw  = 1;  I_BEQ: terms.beq = 1;
        I_J:   terms.jump = 1; default: ;
      endcase
      #1;
      expect_ctrl(instr_e'(i), val, mask);
      checks++;
      if (((ctrl ^ val) & mask) != 0) begin
        failures++; $display("FAIL instr %0d got %b exp %b mask %b", i, ctrl, val, mask);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
