// accum_block: the Accumulation Block (AB) behind the PE array.
//
// An output row of a convolution is the sum of one row pass per (input
// channel, kernel row) pair. The AB holds the running sums of one output row
// in a FIFO: each partial sum that arrives from the PE array is added to the
// matching running sum at the head of the FIFO and the total is pushed back
// at the tail, so after one pass the FIFO again holds the row in order. The
// first pass of a row adds the channel bias instead of a FIFO entry; the
// last pass sends the total out instead of pushing it. When no valid partial
// sum arrives the FIFO and the output are left as they are (frozen).
//
// Interface: psum/tag from the PE array; bias is the Q8.8 bias of the
// output channel being computed, held steady by the controller. out_valid
// pulses one clock after a last-pass partial sum with its final Q16.16 sum;
// out_row_odd carries the row parity on to the pooling block.
//
// From the design description: an adder adding each incoming partial sum to
// its counterpart kept in a FIFO, synchronised addition until the block
// holds the whole convolved result, contents frozen when no data arrives.
// This design's choices: the first/last tags, bias insertion on the first
// pass, and a FIFO depth of one output row (MAX_W words).
module accum_block
  import lenet_pkg::*;
#(
  parameter int unsigned MAX_W = 24   // longest output row (LeNet-1 conv1: 24)
) (
  input  logic  clk,
  input  logic  rst,
  input  acc_t  psum,
  input  tag_t  tag,
  input  data_t bias,
  output acc_t  out_sum,
  output logic  out_valid,
  output logic  out_row_odd
);

  acc_t fifo_head, base, total;
  logic push, pop;
  logic fifo_empty, fifo_full;

  sync_fifo #(.W(ACC_W), .DEPTH(MAX_W)) u_fifo (
    .clk    (clk),
    .rst    (rst),
    .clear  (1'b0),
    .push   (push),
    .wr_data(total),
    .pop    (pop),
    .rd_data(fifo_head),
    .empty  (fifo_empty),
    .full   (fifo_full)
  );

  always_comb begin
    base  = tag.first ? (acc_t'(bias) <<< FRAC) : fifo_head;
    total = base + psum;
    pop   = tag.valid && !tag.first;
    push  = tag.valid && !tag.last;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid   <= 1'b0;
      out_sum     <= '0;
      out_row_odd <= 1'b0;
    end else begin
      out_valid <= tag.valid && tag.last;
      if (tag.valid && tag.last) begin
        out_sum     <= total;
        out_row_odd <= tag.row_odd;
      end
    end
  end

  a_row_held: assert property (@(posedge clk) disable iff (rst) pop |-> !fifo_empty);
  a_row_fits: assert property (@(posedge clk) disable iff (rst) push && !pop |-> !fifo_full);

endmodule
