// tb_controller: drives the opcode and funct of each instruction of the
// subset, plus random encodings outside it, and checks the control signals
// against the control table (don't-cares skipped; an unknown encoding must
// leave every signal 0).
module tb_controller;
  import cpu_pkg::*;
  import tb_ctrl_table_pkg::*;
  logic [5:0] op, funct;
  ctrl_t      ctrl;
  logic [9:0] val, mask;
  int checks = 0, failures = 0;

  controller dut (.*);

  function automatic instr_e classify(logic [5:0] o, logic [5:0] f);
    if (o == 6'h00 && f == 6'h20) return I_ADD;
    if (o == 6'h00 && f == 6'h22) return I_SUB;
    if (o == 6'h0D) return I_ORI;
    if (o == 6'h23) return I_LW;
    if (o == 6'h2B) return I_SW;
    if (o == 6'h04) return I_BEQ;
    if (o == 6'h02) return I_J;
    return I_NONE;
  endfunction

  task automatic check(logic [5:0] o, logic [5:0] f);
    op = o; funct = f; #1;
    expect_ctrl(classify(o, f), val, mask);
    checks++;
    if (((ctrl ^ val) & mask) != 0) begin
      failures++; $display("FAIL op=%h funct=%h got %b exp %b", o, f, ctrl, val);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    check(6'h00, 6'h20); check(6'h00, 6'h22); check(6'h0D, 6'($urandom));
    check(6'h23, 6'($urandom)); check(6'h2B, 6'($urandom));
    check(6'h04, 6'($urandom)); check(6'h02, 6'($urandom));
    for (int i = 0; i < 400; i++) check(6'($urandom), 6'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
