// tb_pool_act_block: self-checking test of the Pooling and Activation Block.
// Pairs of rows of random Q16.16 sums (both signs, some beyond the Q8.8
// range; one block entirely negative) are fed with random idle clocks. The expected output is computed
// here: shift by 8 with saturation, ReLU, then the maximum of each 2x2
// window; outputs must come in row order, one per window.
module tb_pool_act_block;
  import lenet_pkg::*;
  localparam int MW = 24;
  logic clk = 0, rst = 1, clear = 0;
  acc_t in_sum = '0;
  logic in_valid = 0, in_row_odd = 0;
  data_t out_data;
  logic out_valid;
  int checks = 0, failures = 0;
  int exp_q[$];
  int n_sat = 0, n_neg = 0;

  pool_act_block dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int e;
  always @(negedge clk) if (!rst && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
    else begin
      e = exp_q.pop_front();
      if (int'(out_data) != e) begin failures++; $display("FAIL pooled %0d expected %0d", out_data, e); end
    end
  end

  function automatic int act(longint v);
    longint s = v >>> 8;
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    return (s < 0) ? 0 : int'(s);
  endfunction

  initial begin
    int len, a [2][MW], m;
    longint v;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int blk = 0; blk < 10; blk++) begin
      len = (blk == 0) ? MW : 2 * (1 + int'($urandom % (MW / 2)));
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < len; c++) begin
          v = ($urandom % 10 == 0) ? longint'($signed($urandom)) : longint'(int'($urandom % 400000) - 150000);
          if (blk == 1) v = -longint'($urandom % 100000) - 256;   // all negative: ReLU gives 0
          a[r][c] = act(v);
          if (v >>> 8 > 32767) n_sat++;
          if (v < 0) n_neg++;
          while ($urandom % 3 == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1;
          in_sum = acc_t'(v);
          in_row_odd = r[0];
          if (r == 1 && c[0]) begin
            m = a[0][c-1];
            if (a[0][c] > m) m = a[0][c];
            if (a[1][c-1] > m) m = a[1][c-1];
            if (a[1][c] > m) m = a[1][c];
            exp_q.push_back(m);
          end
          @(negedge clk);
          in_valid = 0;
        end
      repeat (3) @(negedge clk);
    end
    checks += 3;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    if (n_sat == 0) failures++;
    if (n_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
