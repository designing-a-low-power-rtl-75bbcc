// lenet_ctrl: sequencer of the LeNet-1 accelerator.
//
// The two convolution layers run one after the other on the same PE array,
// accumulation block and pooling block. For each layer the controller walks
//   output channel m -> output row r -> input channel c -> kernel row i
// and for every (m, r, c, i) runs one row pass:
//   1. read kernel row (m, c, i) from the weight buffer (one clock),
//   2. once the IDB holds input row r+i of channel c, tell it to stream the
//      row, and load the kernel row into the PE array with its first word,
//   3. while the IDB streams, tag each array input: valid once the K-wide
//      window is full (column >= K-1), first for (c, i) = (0, 0), last for
//      (c, i) = (CIN-1, K-1), and the parity of r for the pooling block.
// The next pass starts right after the stream: the PE array switches
// weights PE by PE as the new row reaches them, so passes overlap in the
// array. Only at the end of a layer does the controller wait DRAIN clocks
// for the last results to leave the array and the pooling block.
// A second walker over the same loops runs ahead and asks the IDB to fetch
// the rows of the coming passes whenever one of its two row stores is free,
// so fetching overlaps streaming (pipelined). It stops at the
// end of a layer and restarts with the next layer, after the last layer-1
// result has been written, because layer 2 reads those results.
// Pooled outputs of layer 1 are written to the IFMB from L1_OUT_BASE in
// production order (channel, row, column), which is exactly the layout
// layer 2 reads; pooled outputs of layer 2 go to the FC layer. After layer 2
// the controller waits for the FC layer and pulses done.
//
// Interface: start (one clock, while idle) runs one inference on the image
// already in the IFMB; busy is high until done pulses. All other ports
// drive the buffers and datapath of the accelerator.
//
// The description only names control logic that handles reset, orders the
// operations and signals completion; the loop order, the row-pass schedule
// and the memory map are this design's.
module lenet_ctrl
  import lenet_pkg::*;
#(
  parameter int unsigned IN_W        = 28,   // input image side
  parameter int unsigned C1          = 4,    // conv1 output channels
  parameter int unsigned C2          = 12,   // conv2 output channels
  parameter int unsigned IFMB_AW     = 11,
  parameter int unsigned L1_OUT_BASE = 1024, // IFMB address of layer-1 maps
  parameter int unsigned WB_RW       = 9,
  parameter int unsigned WB_BW       = 4,
  parameter int unsigned CW          = $clog2(IN_W+1),
  parameter int unsigned DRAIN       = K + 4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  output logic                busy,
  output logic                done,
  output logic                layer,        // 0: conv1, 1: conv2
  // weight buffer
  output logic                wb_rd_en,
  output logic [WB_RW-1:0]    wb_rd_row,
  output logic [WB_BW-1:0]    wb_b_idx,
  // PE array
  output logic                pe_w_en,
  output tag_t                pe_tag,
  // IDB
  output logic                idb_start,
  output logic [IFMB_AW-1:0]  idb_base,
  output logic [CW-1:0]       idb_len,
  input  logic                idb_fetch_ready,
  input  logic                idb_row_ready,
  output logic                idb_go,
  input  logic                idb_valid,
  input  logic [CW-1:0]       idb_col,
  input  logic                idb_done,
  // pooling block output routing
  output logic                pab_clear,
  input  logic                pab_valid,
  output logic                ifmb_wr_en,
  output logic [IFMB_AW-1:0]  ifmb_wr_addr,
  output logic                fc_start,
  output logic                fc_valid,
  input  logic                fc_done
);

  localparam int unsigned P1_W = (IN_W - K + 1) / 2;   // layer-2 input side

  typedef enum logic [2:0] {
    C_IDLE, C_LINIT, C_WREAD, C_WLOAD, C_STREAM, C_DRAIN, C_WAITFC
  } cstate_e;

  // position in the loop nest of one layer
  typedef struct packed {
    logic [4:0] m;
    logic [4:0] r;
    logic [4:0] c;
    logic [2:0] i;
  } loop_idx_t;

  cstate_e            state;
  loop_idx_t          p_idx, f_idx;   // pass walker, fetch walker
  logic               f_active;
  logic [4:0]         m, c;
  logic [2:0]         i;
  logic [3:0]         dcnt;
  logic [IFMB_AW-1:0] ocnt;

  // shape of the current layer
  logic [CW-1:0]      in_w;
  logic [4:0]         out_h, cin, cout;
  logic [IFMB_AW-1:0] in_base;
  logic [WB_RW-1:0]   wrow_base;
  logic [WB_BW-1:0]   bias_base;

  always_comb begin
    if (!layer) begin
      in_w      = CW'(IN_W);
      out_h     = 5'(IN_W - K + 1);
      cin       = 5'd1;
      cout      = 5'(C1);
      in_base   = '0;
      wrow_base = '0;
      bias_base = '0;
    end else begin
      in_w      = CW'(P1_W);
      out_h     = 5'(P1_W - K + 1);
      cin       = 5'(C1);
      cout      = 5'(C2);
      in_base   = IFMB_AW'(L1_OUT_BASE);
      wrow_base = WB_RW'(C1 * K);
      bias_base = WB_BW'(C1);
    end
  end

  // next position in the loop nest; wrap = the layer is finished
  function automatic loop_idx_t advance(input loop_idx_t x, input logic [4:0] n_c,
                                        input logic [4:0] n_r, input logic [4:0] n_m,
                                        output logic wrap);
    loop_idx_t y = x;
    wrap = 1'b0;
    if (x.i != 3'(K - 1)) y.i = x.i + 1'b1;
    else begin
      y.i = '0;
      if (x.c != n_c - 1'b1) y.c = x.c + 1'b1;
      else begin
        y.c = '0;
        if (x.r != n_r - 1'b1) y.r = x.r + 1'b1;
        else begin
          y.r = '0;
          if (x.m != n_m - 1'b1) y.m = x.m + 1'b1;
          else begin
            y.m  = '0;
            wrap = 1'b1;
          end
        end
      end
    end
    return y;
  endfunction

  loop_idx_t p_next, f_next;
  logic      p_wrap, f_wrap;
  always_comb begin
    p_next = advance(p_idx, cin, out_h, cout, p_wrap);
    f_next = advance(f_idx, cin, out_h, cout, f_wrap);
  end

  assign m = p_idx.m;
  assign c = p_idx.c;
  assign i = p_idx.i;

  assign busy      = (state != C_IDLE);
  assign wb_rd_en  = (state == C_WREAD);
  assign wb_rd_row = wrow_base + WB_RW'((32'(m) * 32'(cin) + 32'(c)) * K + 32'(i));
  assign wb_b_idx  = bias_base + WB_BW'(m);
  assign idb_go    = (state == C_WLOAD) && idb_row_ready;
  assign pe_w_en   = (state == C_STREAM) && idb_valid && (idb_col == '0);
  assign idb_start = f_active && idb_fetch_ready;
  assign idb_base  = in_base + IFMB_AW'(32'(f_idx.c) * 32'(in_w) * 32'(in_w))
                   + IFMB_AW'((32'(f_idx.r) + 32'(f_idx.i)) * 32'(in_w));
  assign idb_len   = in_w;
  assign pab_clear = (state == C_LINIT);
  assign fc_start  = (state == C_IDLE) && start;

  always_comb begin
    pe_tag         = '0;
    pe_tag.valid   = (state == C_STREAM) && idb_valid && (idb_col >= CW'(K - 1));
    pe_tag.first   = (c == '0) && (i == '0);
    pe_tag.last    = (c == cin - 1'b1) && (i == 3'(K - 1));
    pe_tag.row_odd = p_idx.r[0];
  end

  assign ifmb_wr_en   = pab_valid && !layer;
  assign ifmb_wr_addr = IFMB_AW'(L1_OUT_BASE) + ocnt;
  assign fc_valid     = pab_valid && layer;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= C_IDLE;
      layer    <= 1'b0;
      done     <= 1'b0;
      p_idx    <= '0;
      f_idx    <= '0;
      f_active <= 1'b0;
      dcnt     <= '0;
      ocnt  <= '0;
    end else begin
      done <= 1'b0;
      if (pab_valid) ocnt <= ocnt + 1'b1;
      if (idb_start) begin
        f_idx <= f_next;
        if (f_wrap) f_active <= 1'b0;
      end
      unique case (state)
        C_IDLE: if (start) begin
          layer <= 1'b0;
          state <= C_LINIT;
        end
        C_LINIT: begin
          p_idx    <= '0;
          f_idx    <= '0;
          f_active <= 1'b1;
          ocnt     <= '0;
          state    <= C_WREAD;
        end
        C_WREAD: state <= C_WLOAD;
        C_WLOAD: if (idb_row_ready) state <= C_STREAM;
        C_STREAM: if (idb_done) begin
          p_idx <= p_next;
          dcnt  <= 4'(DRAIN);
          state <= p_wrap ? C_DRAIN : C_WREAD;
        end
        C_DRAIN: begin
          if (dcnt != '0) dcnt <= dcnt - 1'b1;
          else begin
            if (!layer) begin
              layer <= 1'b1;
              state <= C_LINIT;
            end else
              state <= C_WAITFC;
          end
        end
        C_WAITFC: if (fc_done) begin
          done  <= 1'b1;
          state <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  a_fetch_ahead: assert property (@(posedge clk) disable iff (rst) idb_start |-> state != C_IDLE && state != C_LINIT);

endmodule
