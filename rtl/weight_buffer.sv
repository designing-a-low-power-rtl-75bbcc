// weight_buffer: the Weight Buffer (WB) holding convolution filters and
// biases on chip.
//
// Filters are stored as kernel rows: one row word holds the K weights the PE
// array takes for one row pass, split over K banks so that a whole row is read in one
// clock. Row r of the store is kernel row (r mod K) of filter slice r / K;
// the accelerator places conv1 (4 filters x 1 channel x 5 rows = 20 rows) at
// row 0 and conv2 (12 x 4 x 5 = 240 rows) at row 20, 260 rows in all. A
// separate small store holds one Q8.8 bias per output channel (4 + 12).
//
// Interface: weights are written one at a time (w_wr_en, w_wr_row, w_wr_tap,
// w_wr_data) and biases likewise. rd_en/rd_row return the row in rd_kw one
// clock later; b_rd_idx returns its bias in b_rd_data one clock later.
//
// From the design description: the WB keeps the filter weights for the
// convolutions with high-throughput access. This design's choices: the
// row-wide banked organisation, the sizes and the bias store.
module weight_buffer
  import lenet_pkg::*;
#(
  parameter int unsigned ROWS   = 260,
  parameter int unsigned NBIAS  = 16,
  parameter int unsigned RW     = $clog2(ROWS),
  parameter int unsigned BW     = $clog2(NBIAS)
) (
  input  logic                 clk,
  input  logic                 w_wr_en,
  input  logic [RW-1:0]        w_wr_row,
  input  logic [2:0]           w_wr_tap,
  input  data_t                w_wr_data,
  input  logic                 b_wr_en,
  input  logic [BW-1:0]        b_wr_idx,
  input  data_t                b_wr_data,
  input  logic                 rd_en,
  input  logic [RW-1:0]        rd_row,
  output data_t [K-1:0]        rd_kw,
  input  logic [BW-1:0]        b_rd_idx,
  output data_t                b_rd_data
);

  data_t bias [NBIAS];

  for (genvar t = 0; t < K; t++) begin : g_bank
    data_t bank [ROWS];
    always_ff @(posedge clk) begin
      if (w_wr_en && w_wr_tap == 3'(t)) bank[w_wr_row] <= w_wr_data;
      if (rd_en) rd_kw[t] <= bank[rd_row];
    end
  end

  always_ff @(posedge clk) begin
    if (b_wr_en) bias[b_wr_idx] <= b_wr_data;
    b_rd_data <= bias[b_rd_idx];
  end

endmodule
