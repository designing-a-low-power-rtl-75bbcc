// tb_lenet_top: end-to-end test of the LeNet-1 accelerator at its default
// size (28x28 image, 4 and 12 maps, 192 -> 10 fully connected).
//
// Random weights, biases and images are loaded through the load port and two
// inferences are run back to back. A reference model in this testbench,
// written directly from the network definition with integer arithmetic (the
// same Q8.8 / Q16.16 fixed-point rules as the hardware: products summed at
// full precision, bias added at Q16.16, arithmetic shift by 8 with
// saturation, ReLU, 2x2 max pooling), gives the expected layer-1 maps in the
// IFMB, the ten logits and the class; the probabilities must match a
// real-valued softmax of the reference logits within 0.006. The clock count of each inference is
// checked against the schedule of the controller (see expected_cycles).
// The testbench also counts how often each mechanism of the datapath
// happened (weight reloads, row fetch overlapping a stream, a new pass
// entering the PE array while the previous one is still in it, bias
// insertion, frozen accumulator, FIFO reuse, ReLU clipping, both comparator
// outcomes, write-back to the IFMB, layer switch, feature streaming to the
// FC layer) and fails on any that never did.
module tb_lenet_top;
  import lenet_pkg::*;

  localparam int IW = 28, C1 = 4, C2 = 12, KK = 5, NC = 10;
  localparam int O1 = IW - KK + 1, P1 = O1 / 2, O2 = P1 - KK + 1, P2 = O2 / 2;
  localparam int NF = C2 * P2 * P2;
  localparam int NIMG = 2;

  logic clk = 0, rst = 1;
  logic ld_valid = 0;
  ld_sel_e ld_sel = LD_IFM;
  logic [11:0] ld_addr = '0;
  data_t ld_data = '0;
  logic start = 0;
  logic busy, done, layer;
  data_t [NC-1:0] logits;
  logic [3:0] class_id;
  logic [NC-1:0][15:0] probs;

  int checks = 0, failures = 0;

  lenet_top dut (.*);

  always #5 clk = ~clk;

  // network parameters and reference results
  int img  [IW][IW];
  int w1   [C1][KK][KK];
  int b1   [C1];
  int w2   [C2][C1][KK][KK];
  int b2   [C2];
  int wf   [NC][NF];
  int bf   [NC];
  int m1   [C1][P1][P1];
  int m2   [C2][P2][P2];
  int ref_logit [NC];
  int ref_class;

  function automatic int rq(longint a);
    longint s = a >>> 8;
    if (s > 32767) return 32767;
    if (s < -32768) return -32768;
    return int'(s);
  endfunction

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  task automatic reference();
    int c1 [C1][O1][O1];
    int c2 [C2][O2][O2];
    longint s;
    int v;
    for (int m = 0; m < C1; m++)
      for (int y = 0; y < O1; y++)
        for (int x = 0; x < O1; x++) begin
          s = longint'(b1[m]) <<< 8;
          for (int i = 0; i < KK; i++)
            for (int j = 0; j < KK; j++)
              s += longint'(img[y+i][x+j]) * w1[m][i][j];
          v = rq(s);
          c1[m][y][x] = (v < 0) ? 0 : v;
        end
    for (int m = 0; m < C1; m++)
      for (int y = 0; y < P1; y++)
        for (int x = 0; x < P1; x++) begin
          v = c1[m][2*y][2*x];
          if (c1[m][2*y][2*x+1] > v) v = c1[m][2*y][2*x+1];
          if (c1[m][2*y+1][2*x] > v) v = c1[m][2*y+1][2*x];
          if (c1[m][2*y+1][2*x+1] > v) v = c1[m][2*y+1][2*x+1];
          m1[m][y][x] = v;
        end
    for (int m = 0; m < C2; m++)
      for (int y = 0; y < O2; y++)
        for (int x = 0; x < O2; x++) begin
          s = longint'(b2[m]) <<< 8;
          for (int c = 0; c < C1; c++)
            for (int i = 0; i < KK; i++)
              for (int j = 0; j < KK; j++)
                s += longint'(m1[c][y+i][x+j]) * w2[m][c][i][j];
          v = rq(s);
          c2[m][y][x] = (v < 0) ? 0 : v;
        end
    for (int m = 0; m < C2; m++)
      for (int y = 0; y < P2; y++)
        for (int x = 0; x < P2; x++) begin
          v = c2[m][2*y][2*x];
          if (c2[m][2*y][2*x+1] > v) v = c2[m][2*y][2*x+1];
          if (c2[m][2*y+1][2*x] > v) v = c2[m][2*y+1][2*x];
          if (c2[m][2*y+1][2*x+1] > v) v = c2[m][2*y+1][2*x+1];
          m2[m][y][x] = v;
        end
    ref_class = 0;
    for (int n = 0; n < NC; n++) begin
      s = longint'(bf[n]) <<< 8;
      for (int f = 0; f < NF; f++)
        s += longint'(m2[f / (P2*P2)][(f / P2) % P2][f % P2]) * wf[n][f];
      ref_logit[n] = rq(s);
      if (ref_logit[n] > ref_logit[ref_class]) ref_class = n;
    end
  endtask

  task automatic load(ld_sel_e sel, int addr, int data);
    @(negedge clk);
    ld_valid = 1;
    ld_sel   = sel;
    ld_addr  = 12'(addr);
    ld_data  = data_t'(data);
    @(negedge clk);
    ld_valid = 0;
  endtask

  // Controller schedule: a row pass lasts one row fetch (W reads, 3 clocks
  // of turnaround), since the fetch of the row after next waits for a free
  // row store. The first row of each layer cannot be prefetched and costs
  // W+2 clocks more, and the last pass of each layer is followed by a drain.
  // Plus the start clock, one LINIT per layer, a tail of two clocks (FC
  // finish after the last pass, done register), then the softmax unit.
  function automatic int expected_cycles();
    int drain = KK + 4;
    int pass1 = IW + 3;
    int pass2 = P1 + 3;
    return 1 + 1 + (IW + 2) + C1 * O1 * 1 * KK * pass1 + drain
             + 1 + (P1 + 2) + C2 * O2 * C1 * KK * pass2 + drain + 2
             + 2 + NC + 39 * NC;     // softmax unit
  endfunction

  // mechanism counters
  int n_wload = 0, n_bias = 0, n_freeze = 0, n_reuse = 0, n_relu = 0;
  int n_keep_upper = 0, n_take_lower = 0, n_wback = 0, n_layer = 0, n_fcin = 0, n_overlap = 0, n_pass_ovl = 0;
  logic layer_q = 0;

  always @(posedge clk) if (!rst) begin
    if (dut.pe_w_en) n_wload++;
    if (dut.arr_tag.valid && dut.arr_tag.first) n_bias++;
    if (!dut.arr_tag.valid && !dut.u_ab.fifo_empty) n_freeze++;
    if (dut.u_ab.pop) n_reuse++;
    if (dut.ab_valid && $signed(requant(dut.ab_sum)) < 0) n_relu++;
    if (dut.u_pab.pop) begin
      if (dut.u_pab.res_head > dut.u_pab.pair_max) n_keep_upper++;
      else if (dut.u_pab.res_head < dut.u_pab.pair_max) n_take_lower++;
    end
    if (dut.ctl_wr_en) n_wback++;
    if (layer && !layer_q) n_layer++;
    layer_q <= layer;
    if (dut.fc_valid) n_fcin++;
    if (dut.idb_rd_en && dut.idb_valid) n_overlap++;
    if (dut.pe_w_en && (dut.u_array.tag_sr[2].valid || dut.u_array.tag_sr[4].valid)) n_pass_ovl++;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else
      $display("mechanism %-28s %0d", what, n);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (4) @(posedge clk);
    rst = 0;
    // weights: conv in [-0.25, 0.25], biases in [-0.125, 0.125]
    for (int m = 0; m < C1; m++) begin
      b1[m] = rnd(-32, 32);
      load(LD_CONVB, m, b1[m]);
      for (int i = 0; i < KK; i++)
        for (int j = 0; j < KK; j++) begin
          w1[m][i][j] = rnd(-64, 64);
          load(LD_CONVW, (((m * KK) + i) << 3) | j, w1[m][i][j]);
        end
    end
    for (int m = 0; m < C2; m++) begin
      b2[m] = rnd(-32, 32);
      load(LD_CONVB, C1 + m, b2[m]);
      for (int c = 0; c < C1; c++)
        for (int i = 0; i < KK; i++)
          for (int j = 0; j < KK; j++) begin
            w2[m][c][i][j] = rnd(-64, 64);
            load(LD_CONVW, ((C1 * KK + (m * C1 + c) * KK + i) << 3) | j, w2[m][c][i][j]);
          end
    end
    for (int n = 0; n < NC; n++) begin
      bf[n] = rnd(-64, 64);
      load(LD_FCB, n, bf[n]);
      for (int f = 0; f < NF; f++) begin
        wf[n][f] = rnd(-64, 64);
        load(LD_FCW, (f << 4) | n, wf[n][f]);
      end
    end

    for (int t = 0; t < NIMG; t++) begin
      // image: a bright blob on a dark field plus noise, in [0, 1.0]
      for (int y = 0; y < IW; y++)
        for (int x = 0; x < IW; x++) begin
          img[y][x] = ((y - 14 + 3*t) * (y - 14 + 3*t) + (x - 12 - 2*t) * (x - 12 - 2*t) < 40)
                      ? rnd(160, 256) : rnd(0, 40);
          load(LD_IFM, y * IW + x, img[y][x]);
        end
      reference();
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      $display("inference %0d: %0d clocks, class %0d (reference %0d)", t, cyc, class_id, ref_class);
      check("clock count", cyc, expected_cycles());
      for (int m = 0; m < C1; m++)
        for (int y = 0; y < P1; y++)
          for (int x = 0; x < P1; x++)
            check($sformatf("layer-1 map %0d (%0d,%0d)", m, y, x),
                  int'(dut.u_ifmb.mem[1024 + m*P1*P1 + y*P1 + x]), m1[m][y][x]);
      for (int n = 0; n < NC; n++) check($sformatf("logit %0d", n), int'(logits[n]), ref_logit[n]);
      check("class", int'(class_id), ref_class);
      begin
        real rs, rp;
        int psum;
        rs = 0.0;
        psum = 0;
        for (int n = 0; n < NC; n++) rs += $exp(real'(ref_logit[n] - ref_logit[ref_class]) / 256.0);
        for (int n = 0; n < NC; n++) begin
          rp = $exp(real'(ref_logit[n] - ref_logit[ref_class]) / 256.0) / rs;
          psum += int'(probs[n]);
          checks++;
          if ((real'(probs[n]) / 65536.0 - rp) > 0.006 || (rp - real'(probs[n]) / 65536.0) > 0.006) begin
            failures++;
            $display("FAIL probability %0d: %f, softmax of reference %f", n, real'(probs[n]) / 65536.0, rp);
          end
        end
        check("probabilities sum to 1 (within 10/65536)", int'(psum > 65526 && psum <= 65536), 1);
      end
      @(negedge clk);
      check("busy after done", int'(busy), 0);
    end

    need("weight row load", n_wload);
    need("bias insert (first pass)", n_bias);
    need("accumulator frozen", n_freeze);
    need("partial sum reuse", n_reuse);
    need("ReLU clip", n_relu);
    need("pool keeps upper row", n_keep_upper);
    need("pool takes lower row", n_take_lower);
    need("layer-1 write-back", n_wback);
    need("layer switch", n_layer);
    need("features into FC", n_fcin);
    need("row fetch during stream", n_overlap);
    need("new pass entering the array beside the last one", n_pass_ovl);
    check("features per inference", n_fcin, NF * NIMG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
