// tb_ctrl_and_plane: applies all 4096 combinations of opcode and funct and
// checks that exactly the right instruction line is high (or none, for an
// encoding outside the subset), using the opcode/funct values of the
// instruction table written out in the testbench.
module tb_ctrl_and_plane;
  import cpu_pkg::*;
  logic [5:0] op, funct;
  terms_t     terms, exp;
  int checks = 0, failures = 0;

  ctrl_and_plane dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int o = 0; o < 64; o++) begin
      for (int f = 0; f < 64; f++) begin
        op = 6'(o); funct = 6'(f); #1;
        exp      = '0;
        exp.add  = (o == 'h00) && (f == 'h20);
        exp.sub  = (o == 'h00) && (f == 'h22);
        exp.ori  = (o == 'h0D);
        exp.lw   = (o == 'h23);
        exp.sw   = (o == 'h2B);
        exp.beq  = (o == 'h04);
        exp.jump = (o == 'h02);
        checks++;
        if (terms !== exp) begin
          failures++; $display("FAIL op=%h funct=%h got %b exp %b", op, funct, terms, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
