// lenet_top: LeNet-1 inference accelerator.
//
// Classifies a 28x28 image (MNIST digits) with the LeNet-1 network:
//   conv 5x5, 1 -> 4 maps (24x24), ReLU, 2x2 max pool (12x12),
//   conv 5x5, 4 -> 12 maps (8x8), ReLU, 2x2 max pool (4x4),
//   fully connected 192 -> 10 class scores, arg-max class, softmax
//   probabilities.
// Both convolutions run on one datapath: the IFMB holds the map being read,
// the IDB turns one map row at a time into a stream, the weight buffer (WB)
// supplies one 5-weight kernel row to a chain of five PEs, the accumulation
// block (AB) sums the row passes of all kernel rows and input channels, and
// the pooling/activation block (PAB) applies ReLU and 2x2 max pooling. Layer-1
// results go back into the IFMB; layer-2 results stream into the FC layer,
// whose scores the softmax unit turns into probabilities. lenet_ctrl
// sequences all of it.
//
// Interface:
//  - Load port, used while idle: ld_valid writes ld_data (Q8.8) to the store
//    chosen by ld_sel at ld_addr:
//      LD_IFM   ld_addr = row*28 + col of the input pixel
//      LD_CONVW ld_addr = {WB row (9 bits), tap (3 bits)}; WB row =
//               (m*CIN + c)*5 + i for conv1 (from row 0) and conv2 (from row 20)
//      LD_CONVB ld_addr = output channel (conv1 0..3, conv2 4..15)
//      LD_FCW   ld_addr = {feature (8 bits), class (4 bits)}; feature =
//               m*16 + row*4 + col of the second pooled map
//      LD_FCB   ld_addr = class
//  - start (one clock while !busy) runs one inference; done pulses when
//    logits (Q8.8 scores), class_id and probs (Q0.16, 65535 = 1.0) are
//    valid. They stay until the next start. busy covers the whole inference.
// One inference takes 44,149 clocks from start to done (0.44 ms at 100 MHz).
//
// The block structure (IFMB, IDB, WB, PE array, AB, PAB, FC) follows the
// design description; the load port, the memory map and the clocking of the
// passes are this design's.
module lenet_top
  import lenet_pkg::*;
#(
  parameter int unsigned IN_W        = 28,
  parameter int unsigned C1          = 4,
  parameter int unsigned C2          = 12,
  parameter int unsigned NCLASS      = 10,
  parameter int unsigned IFMB_DEPTH  = 2048,
  parameter int unsigned L1_OUT_BASE = 1024
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ld_valid,
  input  ld_sel_e              ld_sel,
  input  logic [11:0]          ld_addr,
  input  data_t                ld_data,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic                 layer,      // convolution being run: 0 first, 1 second
  output data_t [NCLASS-1:0]   logits,
  output logic [3:0]           class_id,
  output logic [NCLASS-1:0][15:0] probs
);

  localparam int unsigned IFMB_AW = $clog2(IFMB_DEPTH);
  localparam int unsigned OW1     = IN_W - K + 1;            // 24
  localparam int unsigned P1      = OW1 / 2;                 // 12
  localparam int unsigned P2      = (P1 - K + 1) / 2;        // 4
  localparam int unsigned NFEAT   = C2 * P2 * P2;            // 192
  localparam int unsigned WB_ROWS = (C1 + C2 * C1) * K;      // 260
  localparam int unsigned WB_RW   = $clog2(WB_ROWS);
  localparam int unsigned CW      = $clog2(IN_W + 1);

  // controller <-> datapath
  logic                wb_rd_en, pe_w_en, idb_start, idb_valid, idb_done;
  logic                idb_fetch_ready, idb_row_ready, idb_go;
  logic [WB_RW-1:0]    wb_rd_row;
  logic [3:0]          wb_b_idx;
  tag_t                pe_tag, arr_tag;
  logic [IFMB_AW-1:0]  idb_base, idb_rd_addr, ctl_wr_addr;
  logic [CW-1:0]       idb_len, idb_col;
  logic                idb_rd_en, ctl_wr_en, pab_clear, pab_valid;
  logic                fc_start, fc_valid, fc_done;
  logic                ctl_busy, ctl_done, sm_busy;
  data_t               ifmb_rd_data, idb_data, pab_data, bias;
  data_t [K-1:0]       kw;
  acc_t                arr_psum, ab_sum;
  logic                ab_valid, ab_row_odd;

  // IFMB write port: external image load or layer-1 results
  logic                ifmb_we;
  logic [IFMB_AW-1:0]  ifmb_wa;
  data_t               ifmb_wd;

  always_comb begin
    if (ld_valid && ld_sel == LD_IFM) begin
      ifmb_we = 1'b1;
      ifmb_wa = IFMB_AW'(ld_addr);
      ifmb_wd = ld_data;
    end else begin
      ifmb_we = ctl_wr_en;
      ifmb_wa = ctl_wr_addr;
      ifmb_wd = pab_data;
    end
  end

  lenet_ctrl #(
    .IN_W(IN_W), .C1(C1), .C2(C2), .IFMB_AW(IFMB_AW),
    .L1_OUT_BASE(L1_OUT_BASE), .WB_RW(WB_RW), .WB_BW(4), .CW(CW)
  ) u_ctrl (
    .clk, .rst, .start, .busy(ctl_busy), .done(ctl_done), .layer,
    .wb_rd_en, .wb_rd_row, .wb_b_idx,
    .pe_w_en, .pe_tag,
    .idb_start, .idb_base, .idb_len,
    .idb_fetch_ready, .idb_row_ready, .idb_go,
    .idb_valid, .idb_col, .idb_done,
    .pab_clear, .pab_valid,
    .ifmb_wr_en(ctl_wr_en), .ifmb_wr_addr(ctl_wr_addr),
    .fc_start, .fc_valid, .fc_done
  );

  ifmb #(.DEPTH(IFMB_DEPTH)) u_ifmb (
    .clk,
    .wr_en  (ifmb_we),
    .wr_addr(ifmb_wa),
    .wr_data(ifmb_wd),
    .rd_en  (idb_rd_en),
    .rd_addr(idb_rd_addr),
    .rd_data(ifmb_rd_data)
  );

  idb #(.MAX_W(IN_W), .AW(IFMB_AW), .CW(CW)) u_idb (
    .clk, .rst,
    .start       (idb_start),
    .base        (idb_base),
    .len         (idb_len),
    .fetch_ready (idb_fetch_ready),
    .ifmb_rd_en  (idb_rd_en),
    .ifmb_rd_addr(idb_rd_addr),
    .ifmb_rd_data(ifmb_rd_data),
    .row_ready   (idb_row_ready),
    .go          (idb_go),
    .out_valid   (idb_valid),
    .out_data    (idb_data),
    .out_col     (idb_col),
    .done        (idb_done)
  );

  weight_buffer #(.ROWS(WB_ROWS), .NBIAS(16)) u_wb (
    .clk,
    .w_wr_en  (ld_valid && ld_sel == LD_CONVW),
    .w_wr_row (WB_RW'(ld_addr[11:3])),
    .w_wr_tap (ld_addr[2:0]),
    .w_wr_data(ld_data),
    .b_wr_en  (ld_valid && ld_sel == LD_CONVB),
    .b_wr_idx (ld_addr[3:0]),
    .b_wr_data(ld_data),
    .rd_en    (wb_rd_en),
    .rd_row   (wb_rd_row),
    .rd_kw    (kw),
    .b_rd_idx (wb_b_idx),
    .b_rd_data(bias)
  );

  pe_array #(.N(K)) u_array (
    .clk, .rst,
    .w_en    (pe_w_en),
    .kw      (kw),
    .in_data (idb_data),
    .in_tag  (pe_tag),
    .out_psum(arr_psum),
    .out_tag (arr_tag)
  );

  accum_block #(.MAX_W(OW1)) u_ab (
    .clk, .rst,
    .psum       (arr_psum),
    .tag        (arr_tag),
    .bias       (bias),
    .out_sum    (ab_sum),
    .out_valid  (ab_valid),
    .out_row_odd(ab_row_odd)
  );

  pool_act_block #(.MAX_W(OW1)) u_pab (
    .clk, .rst,
    .clear     (pab_clear),
    .in_sum    (ab_sum),
    .in_valid  (ab_valid),
    .in_row_odd(ab_row_odd),
    .out_data  (pab_data),
    .out_valid (pab_valid)
  );

  fc_layer #(.NIN(NFEAT), .NOUT(NCLASS)) u_fc (
    .clk, .rst,
    .start    (fc_start),
    .in_valid (fc_valid),
    .in_data  (pab_data),
    .w_wr_en  (ld_valid && ld_sel == LD_FCW),
    .w_wr_feat($clog2(NFEAT)'(ld_addr[11:4])),
    .w_wr_neur($clog2(NCLASS)'(ld_addr[3:0])),
    .w_wr_data(ld_data),
    .b_wr_en  (ld_valid && ld_sel == LD_FCB),
    .b_wr_idx ($clog2(NCLASS)'(ld_addr[3:0])),
    .b_wr_data(ld_data),
    .logits   (logits),
    .class_id (class_id),
    .done     (fc_done)
  );

  softmax_unit #(.N(NCLASS)) u_softmax (
    .clk, .rst,
    .start (ctl_done),
    .logits(logits),
    .probs (probs),
    .done  (done)
  );

  // busy from start until the probabilities are out
  always_ff @(posedge clk) begin
    if (rst)           sm_busy <= 1'b0;
    else if (ctl_done) sm_busy <= 1'b1;
    else if (done)     sm_busy <= 1'b0;
  end
  assign busy = ctl_busy || sm_busy;

  a_idb_free: assert property (@(posedge clk) disable iff (rst) idb_start |-> idb_fetch_ready);
  a_load_idle: assert property (@(posedge clk) disable iff (rst) ld_valid |-> !busy);

endmodule
