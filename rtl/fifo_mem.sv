// fifo_mem: storage array of the asynchronous FIFO.
//
// A simple dual-port memory: one write port in the writer's clock domain (HCLK in the
// bridge) and one read port that reads asynchronously at raddr, so the reader sees the
// oldest entry as soon as the FIFO reports it is not empty (first-word fall-through). The
// entry can only be read after its write pointer has crossed through the synchronizers,
// so the addressed word is stable whenever it is used. The memory is not reset.
//
// Interface: wdata is written to mem[waddr] on the rising wclk edge when wen is high.
// Sizes: DATA_W bits per entry, 2**ADDR_W entries (defaults 32 x 16; the depth is this
// design's choice, sized to hold the longest AHB burst of 16 beats).
module fifo_mem #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ADDR_W = 4
) (
  input  logic              wclk,
  input  logic              wen,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge wclk) begin
    if (wen) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
