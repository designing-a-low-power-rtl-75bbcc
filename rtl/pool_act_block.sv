// pool_act_block: the Pooling and Activation Block (PAB).
//
// Takes finished convolution sums from the accumulation block one per clock
// in row order, brings each to Q8.8 (arithmetic shift, saturation), applies
// the activation and performs 2x2 max pooling with stride 2:
//  - horizontal: the first word of each column pair waits in a register and
//    the comparator keeps the larger of the pair;
//  - vertical: on an even output row the pair maxima are written into the
//    residual FIFO; on the odd row each new pair maximum is compared with the
//    matching entry at the head of the FIFO and the larger is sent out.
// The result is one pooled word per 2x2 window, in row order.
//
// Interface: in_sum/in_valid/in_row_odd from the AB; clear resets the column
// parity and empties the FIFO (pulsed at the start of a layer). out_data /
// out_valid: pooled, activated Q8.8 word, registered (one clock after the
// second word of the window's lower pair).
//
// From the design description: an activation unit, a comparator and a FIFO;
// new inputs are compared with the matching item kept in the residual FIFO
// and the larger one is output. The activation is described as a softmax
// variant, which is not defined element-wise; this design uses ReLU
// (max(0,x)), which suits a hidden layer and commutes with max pooling.
// Row length must be even (24 and 8 in LeNet-1).
module pool_act_block
  import lenet_pkg::*;
#(
  parameter int unsigned MAX_W = 24   // longest input row; FIFO holds MAX_W/2
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  clear,
  input  acc_t  in_sum,
  input  logic  in_valid,
  input  logic  in_row_odd,
  output data_t out_data,
  output logic  out_valid
);

  data_t act, hold, pair_max, res_head, win_max;
  logic  col_odd;
  logic  push, pop, fifo_empty, fifo_full;

  function automatic data_t dmax(input data_t a, input data_t b);
    return (a > b) ? a : b;
  endfunction

  always_comb begin
    act      = requant(in_sum);
    if (act < 0) act = '0;                 // ReLU
    pair_max = dmax(hold, act);
    win_max  = dmax(res_head, pair_max);
    push     = in_valid && col_odd && !in_row_odd;
    pop      = in_valid && col_odd &&  in_row_odd;
  end

  sync_fifo #(.W(DATA_W), .DEPTH(MAX_W/2)) u_res (
    .clk    (clk),
    .rst    (rst),
    .clear  (clear),
    .push   (push),
    .wr_data(pair_max),
    .pop    (pop),
    .rd_data(res_head),
    .empty  (fifo_empty),
    .full   (fifo_full)
  );

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      col_odd   <= 1'b0;
      hold      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= pop;
      if (in_valid) begin
        col_odd <= !col_odd;
        if (!col_odd) hold <= act;
      end
      if (pop) out_data <= win_max;
    end
  end

  a_upper_row_held: assert property (@(posedge clk) disable iff (rst || clear) pop |-> !fifo_empty);
  a_upper_row_fits: assert property (@(posedge clk) disable iff (rst || clear) push |-> !fifo_full);

endmodule
