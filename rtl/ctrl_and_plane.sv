// ctrl_and_plane: the AND plane of the main controller.
//
// Each output is one product term of the opcode bits, recognising one
// instruction: ori, lw, sw, beq and jump from the opcode alone, add and sub
// from the R-type opcode (all zeros) together with the funct field. At most
// one line is high; an opcode or R-type funct outside the subset raises none,
// which makes every control signal 0 (this design's choice: the instruction
// then does nothing but advance the PC).
// Purely combinational: op, funct in; terms out.
module ctrl_and_plane
  import cpu_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output terms_t     terms
);

  logic rtype;

  always_comb begin
    rtype      = ~op[5] & ~op[4] & ~op[3] & ~op[2] & ~op[1] & ~op[0];
    terms.ori  = ~op[5] & ~op[4] &  op[3] &  op[2] & ~op[1] &  op[0];
    terms.lw   =  op[5] & ~op[4] & ~op[3] & ~op[2] &  op[1] &  op[0];
    terms.sw   =  op[5] & ~op[4] &  op[3] & ~op[2] &  op[1] &  op[0];
    terms.beq  = ~op[5] & ~op[4] & ~op[3] &  op[2] & ~op[1] & ~op[0];
    terms.jump = ~op[5] & ~op[4] & ~op[3] & ~op[2] &  op[1] & ~op[0];
    terms.add  = rtype & (funct == FN_ADD);
    terms.sub  = rtype & (funct == FN_SUB);
  end

endmodule
