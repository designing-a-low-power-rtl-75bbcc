// lenet_pkg: types and constants shared by the LeNet-1 accelerator.
//
// Numbers: feature values and weights are signed 16-bit fixed point with 8
// fraction bits (Q8.8). A product is Q16.16 and partial sums are kept at that
// scale in ACC_W bits until the pooling/activation block or the fully
// connected layer shifts them back to Q8.8 with saturation. The word width
// and the fraction width are this design's choice; the network shape
// (28x28 input, 4 and 12 feature maps, 5x5 kernels, 2x2 subsampling, 10
// outputs) is LeNet-1 as the design targets it.
package lenet_pkg;

  localparam int unsigned DATA_W = 16;  // Q8.8 feature/weight word
  localparam int unsigned FRAC   = 8;   // fraction bits of DATA_W words
  localparam int unsigned ACC_W  = 32;  // Q16.16 partial sums
  localparam int unsigned K      = 5;   // kernel side = number of PEs

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Side band that travels through the PE array beside the partial sums so
  // the accumulation and pooling blocks know what each result belongs to.
  typedef struct packed {
    logic valid;    // this output is a complete K-wide row window
    logic first;    // first (channel, kernel row) pass of an output row
    logic last;     // last pass: the accumulated value is final
    logic row_odd;  // output row index is odd (second row of a 2x2 pool)
  } tag_t;

  // What the external load port writes.
  typedef enum logic [2:0] {
    LD_IFM   = 3'd0,   // input image pixel into the IFMB
    LD_CONVW = 3'd1,   // one convolution weight into the WB
    LD_CONVB = 3'd2,   // one convolution bias into the WB
    LD_FCW   = 3'd3,   // one fully connected weight
    LD_FCB   = 3'd4    // one fully connected bias
  } ld_sel_e;

  // Saturate a Q16.16 partial sum to a Q8.8 word (arithmetic shift right).
  function automatic data_t requant(input acc_t a);
    acc_t s;
    s = a >>> FRAC;
    if (s > acc_t'(32767))       return data_t'(16'sh7FFF);
    else if (s < -acc_t'(32768)) return data_t'(16'sh8000);
    else                         return data_t'(s[DATA_W-1:0]);
  endfunction

endpackage
