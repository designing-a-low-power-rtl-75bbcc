// tb_fc_layer: self-checking test of the fully connected layer (192 -> 10).
// Random weights and biases are written, then for several feature vectors
// the 192 features are sent with random idle clocks (and once back to back).
// Expected logits are computed here: bias*256 + sum of feature*weight,
// shifted by 8 with saturation; the class is the index of the largest logit
// (lowest on a tie). done must rise at the third clock edge after the edge
// that samples the last feature.
module tb_fc_layer;
  import lenet_pkg::*;
  localparam int NIN = 192, NOUT = 10;
  logic clk = 0, rst = 1, start = 0, in_valid = 0;
  data_t in_data = '0;
  logic w_wr_en = 0, b_wr_en = 0;
  logic [7:0] w_wr_feat = '0;
  logic [3:0] w_wr_neur = '0, b_wr_idx = '0;
  data_t w_wr_data = '0, b_wr_data = '0;
  data_t [NOUT-1:0] logits;
  logic [3:0] class_id;
  logic done;
  int checks = 0, failures = 0;

  fc_layer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    int w [NOUT][NIN], b [NOUT], x [NIN], lg [NOUT], best, wait_n, scale;
    longint s;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < NOUT; n++) begin
      b[n] = int'($urandom % 512) - 256;
      b_wr_en = 1; b_wr_idx = 4'(n); b_wr_data = data_t'(b[n]);
      @(negedge clk);
      for (int f = 0; f < NIN; f++) begin
        w[n][f] = int'($urandom % 512) - 256;
        b_wr_en = 0; w_wr_en = 1; w_wr_feat = 8'(f); w_wr_neur = 4'(n); w_wr_data = data_t'(w[n][f]);
        @(negedge clk);
      end
      w_wr_en = 0;
    end
    for (int t = 0; t < 6; t++) begin
      scale = (t == 5) ? 32000 : 600;        // last vector drives logits into saturation
      for (int f = 0; f < NIN; f++) x[f] = int'($urandom % scale);
      best = 0;
      for (int n = 0; n < NOUT; n++) begin
        s = longint'(b[n]) * 256;
        for (int f = 0; f < NIN; f++) s += longint'(x[f]) * w[n][f];
        s = s >>> 8;
        lg[n] = (s > 32767) ? 32767 : (s < -32768) ? -32768 : int'(s);
        if (lg[n] > lg[best]) best = n;
      end
      start = 1; @(negedge clk); start = 0;
      for (int f = 0; f < NIN; f++) begin
        if (t != 0) while ($urandom % 3 == 0) @(negedge clk);
        in_valid = 1; in_data = data_t'(x[f]);
        @(negedge clk);
        in_valid = 0;
      end
      wait_n = 1;
      while (!done && wait_n < 20) begin @(negedge clk); wait_n++; end
      check("done delay", wait_n, 4);
      for (int n = 0; n < NOUT; n++) check($sformatf("logit %0d", n), int'(logits[n]), lg[n]);
      check("class", int'(class_id), best);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
