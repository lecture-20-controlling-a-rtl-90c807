// alu: the CPU's arithmetic-logic unit.
//
// Performs ADD, SUB or OR of a and b as selected by ALUctr (00 ADD, 01 SUB,
// 10 OR; 11 is unused and gives 0). Zero is 1 when the result is 0, which
// with SUB tells beq that the two registers are equal. Overflow is ignored:
// sums wrap (this design's choice). Combinational.
module alu
  import cpu_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  aluctr_e          aluctr,
  output logic [WIDTH-1:0] result,
  output logic             zero
);

  always_comb begin
    unique case (aluctr)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_OR:  result = a | b;
      default: result = '0;
    endcase
    zero = (result == '0);
  end

endmodule
