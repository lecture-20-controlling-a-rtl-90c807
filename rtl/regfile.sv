// regfile: 32 x 32-bit register file with two read ports and one write port.
//
// busA = R[Ra] and busB = R[Rb] are read combinationally; busW is written to
// R[Rw] at the rising clock edge when RegWr is 1, so an instruction sees the
// values from before its own write. Register 0 always reads 0 and ignores
// writes, and reset clears every register; both are this design's choices
// (the first follows the MIPS convention).
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] ra,
  input  logic [$clog2(NREGS)-1:0] rb,
  input  logic [$clog2(NREGS)-1:0] rw,
  input  logic [WIDTH-1:0]         busw,
  input  logic                     regwr,
  output logic [WIDTH-1:0]         busa,
  output logic [WIDTH-1:0]         busb
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (regwr && rw != '0) begin
      regs[rw] <= busw;
    end
  end

  assign busa = (ra == '0) ? '0 : regs[ra];
  assign busb = (rb == '0) ? '0 : regs[rb];

endmodule
