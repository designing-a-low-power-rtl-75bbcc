// ifmb: Input Feature Map Buffer, the on-chip store of the map a layer reads.
//
// A simple dual-port memory of Q8.8 words: one synchronous write port and
// one read port with one clock of latency (rd_data is valid the clock after
// rd_en). The accelerator keeps the 28x28 input image at address 0 and
// writes the 4x12x12 pooled output of the first layer from address 1024,
// where the second layer reads it; a layer never overwrites what it reads.
//
// From the design description: the IFMB holds the original input or the
// outputs of earlier layers and serves dynamic reads and writes. This
// design's choices: the size (2048 words) and the memory map.
module ifmb
  import lenet_pkg::*;
#(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  data_t         wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output data_t         rd_data
);

  data_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
