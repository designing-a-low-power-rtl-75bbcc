// fc_layer: the Fully Connected (FC) layer that turns the 12x4x4 = 192
// pooled features of the second layer into 10 class scores and a class.
//
// Features arrive one at a time, straight from the pooling block, in the
// order the accelerator produces them (channel, then row, then column). For
// each feature all NOUT neurons multiply it by their weight for that feature
// and add the product to their accumulator in the same clock (NOUT parallel
// multiply-accumulate units), so the layer keeps pace with any feature rate.
// After the NIN-th feature each accumulator gets its bias, is brought to Q8.8
// with saturation and is published as a logit; the index of the largest
// logit (lowest index on a tie) is the recognised class. A softmax over the
// logits would not change which class is largest, so the class is taken
// from the logits directly.
//
// Interface: start clears the layer; in_valid/in_data deliver features;
// weights are written with w_wr_en/w_wr_feat/w_wr_neur, biases with
// b_wr_en/b_wr_idx. done rises at the third clock edge after the edge that
// samples the last feature and lasts one clock; logits and class_id are
// valid from then until the next start.
//
// From the design description: multiply-accumulate neurons over the
// features, classification into the classes 0-9, control logic for reset,
// sequencing and a completion indication. This design's choices: the
// one-feature-per-clock parallel organisation, widths, and reporting the
// arg-max class instead of softmax probabilities.
module fc_layer
  import lenet_pkg::*;
#(
  parameter int unsigned NIN  = 192,
  parameter int unsigned NOUT = 10,
  parameter int unsigned FW   = $clog2(NIN),
  parameter int unsigned NW   = $clog2(NOUT)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic                 in_valid,
  input  data_t                in_data,
  input  logic                 w_wr_en,
  input  logic [FW-1:0]        w_wr_feat,
  input  logic [NW-1:0]        w_wr_neur,
  input  data_t                w_wr_data,
  input  logic                 b_wr_en,
  input  logic [NW-1:0]        b_wr_idx,
  input  data_t                b_wr_data,
  output data_t [NOUT-1:0]     logits,
  output logic  [NW-1:0]       class_id,
  output logic                 done
);

  logic [FW:0]      fcnt;        // features received
  logic             s1_valid;    // weights of the feature are being read
  data_t            s1_data;
  logic             s1_last;
  data_t            w_rd [NOUT];
  data_t            bias [NOUT];
  acc_t             acc  [NOUT];
  logic             fin, fin_d;
  logic [NW-1:0]    best;

  for (genvar n = 0; n < NOUT; n++) begin : g_neur
    data_t wmem [NIN];
    always_ff @(posedge clk) begin
      if (w_wr_en && w_wr_neur == NW'(n)) wmem[w_wr_feat] <= w_wr_data;
      if (in_valid) w_rd[n] <= wmem[FW'(fcnt)];
    end
  end

  always_ff @(posedge clk) begin
    if (b_wr_en) bias[b_wr_idx] <= b_wr_data;
  end

  // arg-max over the published logits
  always_comb begin
    best = '0;
    for (int n = 1; n < NOUT; n++)
      if (logits[n] > logits[best]) best = NW'(n);
  end

  always_ff @(posedge clk) begin
    if (rst || start) begin
      fcnt     <= '0;
      s1_valid <= 1'b0;
      s1_data  <= '0;
      s1_last  <= 1'b0;
      fin      <= 1'b0;
      fin_d    <= 1'b0;
      done     <= 1'b0;
      class_id <= '0;
      for (int n = 0; n < NOUT; n++) acc[n] <= '0;
      if (rst) logits <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_data  <= in_data;
      s1_last  <= in_valid && (fcnt == (FW+1)'(NIN-1));
      if (in_valid) fcnt <= fcnt + 1'b1;
      if (s1_valid)
        for (int n = 0; n < NOUT; n++)
          acc[n] <= acc[n] + acc_t'(s1_data * w_rd[n]);
      fin <= s1_valid && s1_last;
      if (fin)
        for (int n = 0; n < NOUT; n++)
          logits[n] <= requant(acc[n] + (acc_t'(bias[n]) <<< FRAC));
      fin_d <= fin;
      done  <= fin_d;
      if (fin_d) class_id <= best;
    end
  end

  a_no_extra: assert property (@(posedge clk) disable iff (rst || start) in_valid |-> fcnt < (FW+1)'(NIN));

endmodule
