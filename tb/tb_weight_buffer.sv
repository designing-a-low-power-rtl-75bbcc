// tb_weight_buffer: self-checking test of the weight buffer.
// Writes every tap of every kernel row and every bias with random values,
// then reads all rows back as whole kernel rows (one clock latency) and all
// biases, comparing with the values written.
module tb_weight_buffer;
  import lenet_pkg::*;
  localparam int ROWS = 260, NB = 16;
  logic clk = 0, w_wr_en = 0, b_wr_en = 0, rd_en = 0;
  logic [8:0] w_wr_row = '0, rd_row = '0;
  logic [2:0] w_wr_tap = '0;
  logic [3:0] b_wr_idx = '0, b_rd_idx = '0;
  data_t w_wr_data = '0, b_wr_data = '0, b_rd_data;
  data_t [K-1:0] rd_kw;
  int checks = 0, failures = 0;
  int wm [ROWS][K], bm [NB];

  weight_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int t = 0; t < K; t++) begin
        @(negedge clk);
        wm[r][t] = int'($signed(16'($urandom)));
        w_wr_en = 1; w_wr_row = 9'(r); w_wr_tap = 3'(t); w_wr_data = data_t'(wm[r][t]);
      end
    for (int b = 0; b < NB; b++) begin
      @(negedge clk);
      w_wr_en = 0;
      bm[b] = int'($signed(16'($urandom)));
      b_wr_en = 1; b_wr_idx = 4'(b); b_wr_data = data_t'(bm[b]);
    end
    @(negedge clk) b_wr_en = 0;
    for (int r = ROWS - 1; r >= 0; r--) begin
      rd_en = 1; rd_row = 9'(r); b_rd_idx = 4'(r % NB);
      @(negedge clk);
      for (int t = 0; t < K; t++) begin
        checks++;
        if (int'(rd_kw[t]) != wm[r][t]) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d tap %0d: %0d expected %0d", r, t, rd_kw[t], wm[r][t]);
        end
      end
      checks++;
      if (int'(b_rd_data) != bm[r % NB]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
