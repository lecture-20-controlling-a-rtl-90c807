// tb_alu: checks ADD, SUB and OR on random and corner operands, and the
// Zero flag, against arithmetic done in the testbench.
module tb_alu;
  import cpu_pkg::*;
  logic [31:0] a, b, result, exp;
  aluctr_e     op;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .aluctr(op), .result(result), .zero(zero));

  task automatic check(aluctr_e o, logic [31:0] x, logic [31:0] y);
    a = x; b = y; op = o;
    #1;
    case (o)
      ALU_ADD: exp = x + y;
      ALU_SUB: exp = x - y;
      default: exp = x | y;
    endcase
    checks++;
    if (result !== exp || zero !== (exp == 0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h got %h/%b exp %h", o.name(), x, y, result, zero, exp);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      check(ALU_ADD, $urandom, $urandom);
      check(ALU_SUB, $urandom, $urandom);
      check(ALU_OR,  $urandom, $urandom);
    end
    check(ALU_SUB, 32'h1234_5678, 32'h1234_5678);   // equal -> Zero
    check(ALU_ADD, 32'hFFFF_FFFF, 32'h1);           // wraps to 0
    check(ALU_OR,  32'h0, 32'h0);
    check(ALU_SUB, 32'h0, 32'h1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
