// controller: main control of the single-cycle CPU.
//
// A two-level PLA: ctrl_and_plane turns the opcode (and, for R-type, the
// funct field) into one line per instruction, and ctrl_or_plane ORs those
// lines into the control signals. It is combinational; its outputs settle
// within the same cycle as the instruction fetch. Interface: op =
// instruction[31:26], funct = instruction[5:0], ctrl = all control signals.
module controller
  import cpu_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);

  terms_t terms;

  ctrl_and_plane u_and (.op(op), .funct(funct), .terms(terms));
  ctrl_or_plane  u_or  (.terms(terms), .ctrl(ctrl));

endmodule
