// tb_dmem: writes random words at random aligned addresses and reads them
// back combinationally, against an associative array in the testbench;
// checks that WrEn = 0 leaves memory unchanged and that address bits above
// the memory size wrap.
module tb_dmem;
  localparam int WORDS = 64;
  logic        clk = 0, wren = 0;
  logic [31:0] adr = 0, din = 0, dout;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  dmem #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // fill every word first so that no read sees uninitialised contents
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); adr = i * 4; din = $urandom; wren = 1; model[i] = din;
    end
    @(negedge clk); wren = 0;
    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      adr  = {$urandom} & 32'hFFFF_FFFC;
      din  = $urandom;
      wren = $urandom % 2;
      #1; checks++;
      if (dout !== model[adr[7:2]]) begin
        failures++; $display("FAIL read adr=%h got %h exp %h", adr, dout, model[adr[7:2]]);
      end
      @(posedge clk); #1;
      if (wren) model[adr[7:2]] = din;
      checks++;
      if (dout !== model[adr[7:2]]) begin
        failures++; $display("FAIL after write adr=%h got %h exp %h", adr, dout, model[adr[7:2]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
