// tb_regfile: random writes and reads on both ports, checked against a
// register array kept in the testbench. Also checks reset, that register 0
// stays 0, that RegWr = 0 writes nothing, and that a write appears only
// after the clock edge.
module tb_regfile;
  logic        clk = 0, rst_n = 0, regwr = 0;
  logic [4:0]  ra = 0, rb = 0, rw = 0;
  logic [31:0] busw = 0, busa, busb;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.*);

  always #5 clk = ~clk;

  task automatic check_reads();
    for (int i = 0; i < 4; i++) begin
      ra = 5'($urandom); rb = 5'($urandom); #1;
      checks++;
      if (busa !== model[ra] || busb !== model[rb]) begin
        failures++;
        $display("FAIL ra=%0d %h/%h rb=%0d %h/%h", ra, busa, model[ra], rb, busb, model[rb]);
      end
    end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) model[i] = 0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    check_reads();
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      rw = 5'($urandom); busw = $urandom; regwr = ($urandom % 4) != 0;
      if (n % 50 == 0) rw = 0;
      ra = rw; #1;
      checks++;                                  // not yet written
      if (busa !== model[rw]) begin failures++; $display("FAIL early write r%0d", rw); end
      @(posedge clk); #1;
      if (regwr && rw != 0) model[rw] = busw;
      regwr = 0;
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
