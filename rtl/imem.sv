// imem: the ideal instruction memory.
//
// Holds WORDS instruction words and returns the word at the byte address
// addr combinationally, within the cycle (addr[1:0] ignored, upper bits
// wrap). The CPU itself never writes it; the synchronous load port (we,
// waddr, wdata) is this design's way of placing a program before or while
// the CPU is held in reset. Size and load port are this design's choices.
module imem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+1:2]] <= wdata;
  end

  assign rdata = mem[addr[AW+1:2]];

endmodule
