// tb_extender: checks zero- and sign-extension of random and corner
// immediates against integer arithmetic.
module tb_extender;
  logic [15:0] imm;
  logic        extop;
  logic [31:0] ext, exp;
  int checks = 0, failures = 0;

  extender dut (.imm16(imm), .extop(extop), .ext(ext));

  task automatic check(logic [15:0] i, logic e);
    int signed s;
    imm = i; extop = e; #1;
    s   = int'(signed'(i));
    exp = e ? 32'(s) : {16'h0, i};
    checks++;
    if (ext !== exp) begin
      failures++; $display("FAIL imm=%h extop=%b got %h exp %h", i, e, ext, exp);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    check(16'h8000, 1'b0); check(16'h8000, 1'b1);
    check(16'h7FFF, 1'b0); check(16'h7FFF, 1'b1);
    check(16'hFFFF, 1'b1); check(16'h0000, 1'b1);
    for (int i = 0; i < 500; i++) check(16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
