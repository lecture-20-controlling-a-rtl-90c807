// dmem: the ideal data memory.
//
// Word-wide memory of WORDS words. Data Out is the word at Adr, read
// combinationally within the cycle; when WrEn is 1, Data In is written to
// that word at the rising clock edge. Only whole, aligned words are
// accessed: Adr[1:0] is ignored and address bits above the memory's size
// wrap. Size, alignment and the absence of a reset are this design's choices.
module dmem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic        wren,
  input  logic [31:0] adr,
  input  logic [31:0] din,
  output logic [31:0] dout
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] idx;

  assign idx = adr[AW+1:2];

  always_ff @(posedge clk) begin
    if (wren) mem[idx] <= din;
  end

  assign dout = mem[idx];

endmodule
