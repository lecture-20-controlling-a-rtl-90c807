// tb_datapath: feeds the datapath random add, sub, ori, lw, sw and beq
// instructions together with control signals worked out in the testbench,
// and runs an instruction-level model beside it. Each cycle it checks the
// Zero output; after each clock edge it checks every register (read through
// the hierarchy) against the model. The data memory is first filled by sw
// instructions so that every lw reads known data.
module tb_datapath;
  import cpu_pkg::*;
  import tb_asm_pkg::*;
  localparam int WORDS = 64;
  logic        clk = 0, rst_n = 0, zero;
  logic [31:0] instr = 0;
  ctrl_t       ctrl;
  logic [31:0] R [32];
  logic [31:0] M [WORDS];
  int checks = 0, failures = 0;

  datapath #(.DMEM_WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  // Control for each instruction, from the register transfers
  function automatic ctrl_t ctrl_for(int k);
    ctrl_t c = '0;
    case (k)
      0: begin c.reg_dst = 1; c.reg_write = 1; c.alu_ctr = ALU_ADD; end            // add
      1: begin c.reg_dst = 1; c.reg_write = 1; c.alu_ctr = ALU_SUB; end            // sub
      2: begin c.alu_src = 1; c.reg_write = 1; c.alu_ctr = ALU_OR; end             // ori
      3: begin c.alu_src = 1; c.ext_op = 1; c.mem_to_reg = 1; c.reg_write = 1; end // lw
      4: begin c.alu_src = 1; c.ext_op = 1; c.mem_write = 1; end                   // sw
      default: begin c.npc_sel = 1; c.alu_ctr = ALU_SUB; end                       // beq
    endcase
    return c;
  endfunction

  // Apply one instruction, check Zero and the registers
  task automatic step(int k, int rd, int rs, int rt, int imm);
    logic [31:0] a, b, ext, res;
    logic        z;
    @(negedge clk);
    case (k)
      0: instr = a_add(rd, rs, rt);
      1: instr = a_sub(rd, rs, rt);
      2: instr = a_ori(rt, rs, imm);
      3: instr = a_lw (rt, rs, imm);
      4: instr = a_sw (rt, rs, imm);
      default: instr = a_beq(rs, rt, imm);
    endcase
    ctrl = ctrl_for(k);
    a   = R[rs]; b = R[rt];
    ext = (k == 2) ? {16'h0, 16'(imm)} : {{16{imm[15]}}, 16'(imm)};
    case (k)
      0: res = a + b;
      1, 5: res = a - b;
      2: res = a | ext;
      default: res = a + ext;
    endcase
    z = (res == 0);
    #1; checks++;
    if (zero !== z) begin failures++; $display("FAIL zero k=%0d got %b exp %b", k, zero, z); end
    @(posedge clk); #1;
    case (k)
      0, 1: if (rd != 0) R[rd] = res;
      2:    if (rt != 0) R[rt] = res;
      3:    if (rt != 0) R[rt] = M[res[7:2]];
      4:    M[res[7:2]] = b;
      default: ;
    endcase
    for (int r = 0; r < 32; r++) begin
      checks++;
      if (((r == 0) ? 32'h0 : dut.u_regfile.regs[r]) !== R[r]) begin
        failures++; $display("FAIL k=%0d R%0d got %h exp %h", k, r, dut.u_regfile.regs[r], R[r]);
      end
    end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int r = 0; r < 32; r++) R[r] = 0;
    ctrl = '0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    // put values in registers, then fill memory
    for (int r = 1; r < 32; r++) step(2, 0, 0, r, int'($urandom % 65536));
    for (int w = 0; w < WORDS; w++) step(4, 0, 0, 1 + w % 31, w * 4);
    for (int n = 0; n < 1500; n++) begin
      int k, rs, rt, rd, imm;
      k  = $urandom % 6;
      rs = $urandom % 32; rt = $urandom % 32; rd = $urandom % 32;
      imm = $urandom % 65536;
      if (k == 3 || k == 4) begin rs = 0; imm = ($urandom % WORDS) * 4; end
      if (k == 5 && n % 3 == 0) rt = rs;                 // equal registers
      step(k, rd, rs, rt, imm);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
