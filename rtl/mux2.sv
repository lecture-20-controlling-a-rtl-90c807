// mux2: two-input multiplexer, out = sel ? in1 : in0.
// Used for every selector of the datapath (RegDst, ALUSrc, MemtoReg) and
// of the next-address logic (branch and jump muxes). Combinational.
module mux2 #(
  parameter int unsigned W = 32
) (
  input  logic         sel,
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  output logic [W-1:0] out
);

  assign out = sel ? in1 : in0;

endmodule
