// tb_lenet_ctrl: self-checking test of the sequencer.
// The controller drives a real IDB (over a dummy IFMB) and the testbench
// stands in for the pooling block (one pooled word for every odd column of
// an odd row of a last pass). Expected pass lists for both LeNet-1 layers
// are built from the loop order m -> r -> c -> i. The testbench checks the
// row-fetch requests (IFMB address and length, in order, at most two ahead
// and never into the next layer before the current one is written back),
// and for every pass the weight buffer row, the bias index, that the
// weights load together with the first streamed word, the tags of every streamed word
// (valid for columns >= 4, first, last, row parity), the number of passes
// per layer, that layer-1 pooled words go to consecutive IFMB addresses from
// 1024 and layer-2 words to the FC layer, and that done follows fc_done.
module tb_lenet_ctrl;
  import lenet_pkg::*;
  logic clk = 0, rst = 1, start = 0;
  logic busy, done, layer;
  logic wb_rd_en, pe_w_en, idb_start, pab_clear, ifmb_wr_en, fc_start, fc_valid;
  logic [8:0] wb_rd_row;
  logic [3:0] wb_b_idx;
  tag_t pe_tag;
  logic [10:0] idb_base, ifmb_wr_addr;
  logic [4:0] idb_len, idb_col;
  logic idb_valid, idb_done, pab_valid, fc_done = 0;
  logic idb_fetch_ready, idb_row_ready, idb_go;
  logic ifmb_rd_en;
  logic [10:0] ifmb_rd_addr;
  data_t ifmb_rd_data, idb_data;
  int checks = 0, failures = 0;

  lenet_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 15) $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask

  idb u_idb (
    .clk, .rst,
    .start(idb_start), .base(idb_base), .len(idb_len), .fetch_ready(idb_fetch_ready),
    .ifmb_rd_en, .ifmb_rd_addr, .ifmb_rd_data,
    .row_ready(idb_row_ready), .go(idb_go),
    .out_valid(idb_valid), .out_data(idb_data), .out_col(idb_col), .done(idb_done)
  );
  always_ff @(posedge clk) ifmb_rd_data <= data_t'(ifmb_rd_addr);

  // pooling stand-in: one word per 2x2 window, three clocks later
  logic [3:0] pq = '0;
  always @(posedge clk) begin
    pq <= {pq[2:0], pe_tag.valid && pe_tag.last && pe_tag.row_odd && idb_col[0]};
  end
  assign pab_valid = pq[3];

  // observed write-back / FC traffic
  int n_wr = 0, n_fc = 0, n_tag = 0;
  always @(posedge clk) if (!rst) begin
    if (ifmb_wr_en) begin
      check("ifmb write address", int'(ifmb_wr_addr), 1024 + n_wr);
      check("write-back only in layer 1", int'(layer), 0);
      n_wr++;
    end
    if (fc_valid) begin
      check("FC feed only in layer 2", int'(layer), 1);
      n_fc++;
    end
    if (pe_tag.valid) n_tag++;
  end

  // expected passes of both layers
  typedef struct {
    int layer, wrow, bidx, base, len, first, last, odd;
  } pass_t;
  pass_t exp_p[$];
  int n_l1;

  // fetch monitor: requests in pass order, never ahead into layer 2 early
  int n_fetch = 0, n_pass = 0, n_wb1 = 0;
  always @(posedge clk) if (!rst && idb_start) begin
    if (n_fetch < exp_p.size()) begin
      check("fetch address", int'(idb_base), exp_p[n_fetch].base);
      check("fetch length", int'(idb_len), exp_p[n_fetch].len);
      check("fetch at most two passes ahead", int'(n_fetch - n_pass <= 2), 1);
      if (n_fetch == n_l1) check("layer 2 fetched after write-back", n_wr, 576);
    end else check("extra fetch", 1, 0);
    n_fetch++;
  end

  initial begin
    int W, OH, CIN, COUT, vcnt;
    pass_t p;
    for (int L = 0; L < 2; L++) begin
      W = L ? 12 : 28; OH = W - 4; CIN = L ? 4 : 1; COUT = L ? 12 : 4;
      for (int m = 0; m < COUT; m++)
        for (int r = 0; r < OH; r++)
          for (int c = 0; c < CIN; c++)
            for (int i = 0; i < 5; i++) begin
              p.layer = L;
              p.wrow  = (L ? 20 : 0) + (m * CIN + c) * 5 + i;
              p.bidx  = (L ? 4 : 0) + m;
              p.base  = (L ? 1024 : 0) + c * W * W + (r + i) * W;
              p.len   = W;
              p.first = (c == 0 && i == 0);
              p.last  = (c == CIN - 1 && i == 4);
              p.odd   = r % 2;
              exp_p.push_back(p);
            end
      if (L == 0) n_l1 = exp_p.size();
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    check("busy after start", int'(busy), 1);
    for (int k = 0; k < exp_p.size(); k++) begin
      p = exp_p[k];
      while (!wb_rd_en) @(negedge clk);
      check("WB row", int'(wb_rd_row), p.wrow);
      check("bias index", int'(wb_b_idx), p.bidx);
      check("layer", int'(layer), p.layer);
      @(negedge clk);
      while (!idb_go) begin
        check("waiting only for the IDB", int'(idb_row_ready), 0);
        @(negedge clk);
      end
      n_pass++;
      @(negedge clk);
      check("weight load with the first word", int'(pe_w_en && idb_valid && idb_col == 0), 1);
      vcnt = 0;
      while (idb_valid) begin
        check("no weight load inside a row", int'(pe_w_en), int'(idb_col == 0));
        if (pe_tag.valid) vcnt++;
        check("tag valid", int'(pe_tag.valid), int'(idb_col >= 4));
        check("tag first", int'(pe_tag.first), p.first);
        check("tag last", int'(pe_tag.last), p.last);
        check("tag row parity", int'(pe_tag.row_odd), p.odd);
        check("streamed word is the fetched row", int'(idb_data), p.base + int'(idb_col));
        @(negedge clk);
      end
      check("windows per pass", vcnt, p.len - 4);
    end
    check("passes", n_pass, 480 + 1920);
    repeat (12) @(negedge clk);
    check("fetches", n_fetch, 480 + 1920);
    check("pooled words written back", n_wr, 576);
    check("features sent to FC", n_fc, 192);
    check("waiting for FC", int'(busy && !done), 1);
    fc_done = 1;
    @(negedge clk) fc_done = 0;
    check("done after fc_done", int'(done), 1);
    @(negedge clk);
    check("idle after done", int'(busy), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
