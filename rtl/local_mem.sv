// local_mem: local memory between the DMA channel and the engines, DEPTH words of 64
// bits. One synchronous write port (the DMA side); the whole contents are visible at
// `words`, so that an engine can take a loaded block in one step (the memory is a
// register file).
// The document places local memories (LM) between the bus and the engines; their size
// and ports are this design's own.
module local_mem #(
  parameter int DEPTH = 128
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [63:0]              wdata,
  output logic [63:0]              words [DEPTH]
);
  logic [63:0] mem [DEPTH];
  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;
  assign words = mem;
endmodule
