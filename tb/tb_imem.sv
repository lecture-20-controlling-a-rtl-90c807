// tb_imem: loads every word through the load port, then reads them at
// random addresses and checks each against the loaded value.
module tb_imem;
  localparam int WORDS = 128;
  logic        clk = 0, we = 0;
  logic [31:0] addr = 0, waddr = 0, wdata = 0, rdata;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  imem #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); we = 1; waddr = i * 4; wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 500; n++) begin
      addr = $urandom & 32'hFFFF_FFFC; #1;
      checks++;
      if (rdata !== model[addr[8:2]]) begin
        failures++; $display("FAIL addr=%h got %h exp %h", addr, rdata, model[addr[8:2]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
