// tb_ifu: loads random instruction words, releases reset and, for 2000
// cycles, drives random nPC_sel, Zero and Jump. Each cycle it checks the
// fetched instruction, and after the edge the new PC, against a next-PC
// model in the testbench (PC+4, branch target, or jump target). Counts how
// often each of the three paths was taken.
module tb_ifu;
  localparam int WORDS = 64;
  logic        clk = 0, rst_n = 0, npc_sel = 0, zero = 0, jump = 0;
  logic        prog_we = 0;
  logic [31:0] prog_addr = 0, prog_wdata = 0, pc, instr;
  logic [31:0] mem [WORDS];
  logic [31:0] exp_pc, seq, off;
  int checks = 0, failures = 0, n_seq = 0, n_br = 0, n_jump = 0;

  ifu #(.IMEM_WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = i * 4; prog_wdata = $urandom; mem[i] = prog_wdata;
    end
    @(negedge clk); prog_we = 0;
    @(negedge clk); rst_n = 1;
    checks++;
    if (pc !== 0) begin failures++; $display("FAIL reset pc=%h", pc); end
    exp_pc = 0;
    for (int n = 0; n < 2000; n++) begin
      npc_sel = $urandom % 2; zero = $urandom % 2; jump = ($urandom % 4) == 0;
      #1; checks++;
      if (instr !== mem[pc[7:2]]) begin
        failures++; $display("FAIL fetch pc=%h got %h exp %h", pc, instr, mem[pc[7:2]]);
      end
      seq = exp_pc + 4;
      off = {{14{mem[exp_pc[7:2]][15]}}, mem[exp_pc[7:2]][15:0], 2'b00};
      if (jump)                 begin exp_pc = {exp_pc[31:28], mem[exp_pc[7:2]][25:0], 2'b00}; n_jump++; end
      else if (npc_sel && zero) begin exp_pc = seq + off; n_br++; end
      else                      begin exp_pc = seq; n_seq++; end
      @(negedge clk); checks++;
      if (pc !== exp_pc) begin failures++; $display("FAIL next pc got %h exp %h", pc, exp_pc); end
    end
    checks++;
    if (n_seq == 0 || n_br == 0 || n_jump == 0) begin failures++; $display("FAIL a path never taken"); end
    $display("paths: +4 %0d, branch %0d, jump %0d", n_seq, n_br, n_jump);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
