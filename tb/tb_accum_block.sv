// tb_accum_block: self-checking test of the Accumulation Block.
// For several output rows of random length (up to MAX_W) a random number of
// passes is sent, each pass a row of random partial sums, with idle gaps
// inside and between passes (the block must hold its contents). The block
// must emit, after the last pass, bias*256 + the sum over passes for every
// column, in order, with the row parity, one clock after the input.
module tb_accum_block;
  import lenet_pkg::*;
  localparam int MW = 24;
  logic clk = 0, rst = 1;
  acc_t psum = '0, out_sum;
  tag_t tag = '0;
  data_t bias = '0;
  logic out_valid, out_row_odd;
  int checks = 0, failures = 0;
  longint exp_q[$];
  logic   exp_odd[$];
  int     n_gap = 0;

  accum_block dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint e;
  logic eo;
  always @(negedge clk) if (!rst && out_valid) begin
    checks += 2;
    if (exp_q.size() == 0) begin failures += 2; $display("FAIL unexpected output"); end
    else begin
      e = exp_q.pop_front();
      eo = exp_odd.pop_front();
      if (out_sum != acc_t'(e)) begin failures++; $display("FAIL sum %0d expected %0d", out_sum, e); end
      if (out_row_odd != eo) begin failures++; $display("FAIL row parity"); end
    end
  end

  initial begin
    longint acc [MW];
    int len, passes, v;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int row = 0; row < 12; row++) begin
      len = (row == 0) ? MW : 2 + int'($urandom % (MW - 1));
      passes = (row == 1) ? 1 : 1 + int'($urandom % 20);
      bias = data_t'(int'($urandom % 512) - 256);
      for (int c = 0; c < len; c++) acc[c] = longint'(bias) * 256;
      for (int p = 0; p < passes; p++) begin
        for (int c = 0; c < len; c++) begin
          while (($urandom % 4) == 0) begin
            tag = '0;
            psum = acc_t'($urandom);     // ignored: not valid
            n_gap++;
            @(negedge clk);
          end
          v = int'($urandom % 200000) - 100000;
          psum = acc_t'(v);
          acc[c] += v;
          tag.valid = 1;
          tag.first = (p == 0);
          tag.last = (p == passes - 1);
          tag.row_odd = row[0];
          if (p == passes - 1) begin exp_q.push_back(acc[c]); exp_odd.push_back(row[0]); end
          @(negedge clk);
        end
        tag = '0;
        repeat (3) @(negedge clk);
      end
    end
    repeat (3) @(negedge clk);
    checks += 2;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    if (n_gap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
