// extender: widens the 16-bit immediate to 32 bits.
// ExtOp = 0 zero-extends (ori), ExtOp = 1 sign-extends (lw, sw); the
// encoding follows the CPU's control table. Combinational.
module extender (
  input  logic [15:0] imm16,
  input  logic        extop,
  output logic [31:0] ext
);

  always_comb ext = {{16{extop & imm16[15]}}, imm16};

endmodule
