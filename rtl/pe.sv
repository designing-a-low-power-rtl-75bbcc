// pe: one Processing Element of the convolution array.
//
// The PE holds a stationary weight and performs one multiply-accumulate per
// clock: Po <= Pi + W * I. The input word I is captured in an input register
// that feeds the multiplier; the weight is captured in a weight register only
// while w_en is high. The adder adds the product to Pi, the partial sum of
// the previous PE, and the result is held in the Po register. The input
// register drives a second register, Io, whose output passes the input word
// on to the next PE.
//
// Timing: i_in sampled at edge t sits in the input register and reaches the
// multiplier in the following clock; its product is in Po after edge t+1,
// and Io presents it after edge t+1 as well. Po(t+1) = Pi(t+1) + W*I(t).
// Inputs thus pass two registers per PE (input register, Io) while partial
// sums pass one (Po); this skew makes a chain of PEs a row convolution.
//
// From the design description: multiplier, adder, the Po and Io registers
// with clk and rst, the weight register with an enable. This design's
// choices: synchronous active-high reset, signed fixed-point operands, the
// extra input register in front of the multiplier (drawn in the PE
// architecture figure) being the first of the two input delays.
module pe
  import lenet_pkg::*;
#(
  parameter int unsigned DW = DATA_W,  // input/weight width
  parameter int unsigned AW = ACC_W    // partial sum width
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 w_en,   // load w_in into the weight register
  input  logic signed [DW-1:0] w_in,
  input  logic signed [DW-1:0] i_in,   // Ii: input data
  input  logic signed [AW-1:0] p_in,   // Pi: previous PE's partial sum
  output logic signed [DW-1:0] i_out,  // Io: registered input to next PE
  output logic signed [AW-1:0] p_out   // Po: registered partial sum
);

  logic signed [DW-1:0]   i_reg, w_reg;
  logic signed [2*DW-1:0] prod;
  logic signed [AW-1:0]   sum;

  always_comb begin
    prod = i_reg * w_reg;
    sum  = p_in + AW'(prod);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      i_reg <= '0;
      w_reg <= '0;
      i_out <= '0;
      p_out <= '0;
    end else begin
      i_reg <= i_in;
      i_out <= i_reg;
      p_out <= sum;
      if (w_en) w_reg <= w_in;
    end
  end

endmodule
