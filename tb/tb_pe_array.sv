// tb_pe_array: self-checking test of the five-PE array.
// Rows of random words are streamed through the array, each with its own
// random kernel row, loaded with w_en together with the row's first word.
// The gap between rows is random, from one clock (rows overlapping in the
// array) to longer than the array, and kw is scrambled right after each
// load. Every tagged output is compared
// with the valid correlation sum_j kw[j]*x[c-4+j] computed here, and must
// appear exactly N+1 = 6 clocks after the input word that completes its
// window. The number of outputs per row must be W-4.
module tb_pe_array;
  import lenet_pkg::*;
  localparam int N = 5, W = 28, ROWS = 40;
  logic clk = 0, rst = 1, w_en = 0;
  data_t [N-1:0] kw;
  data_t in_data = '0;
  tag_t in_tag = '0, out_tag;
  acc_t out_psum;
  int checks = 0, failures = 0;
  int cyc = 0;

  pe_array dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results queued by the driver: value and clock it must appear
  longint exp_q[$];
  int     exp_t[$];

  longint e;
  int et;
  always @(negedge clk) if (!rst && out_tag.valid) begin
    checks += 2;
    if (exp_q.size() == 0) begin
      failures += 2;
      $display("FAIL unexpected output");
    end else begin
      e = exp_q.pop_front();
      et = exp_t.pop_front();
      if (out_psum != acc_t'(e)) begin failures++; $display("FAIL psum %0d expected %0d", out_psum, e); end
      if (cyc != et) begin failures++; $display("FAIL latency: at %0d expected %0d", cyc, et); end
    end
  end

  initial begin
    int x [W];
    int k [N];
    longint s;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int r = 0; r < ROWS; r++) begin
      for (int j = 0; j < N; j++) begin
        k[j] = int'($urandom % 512) - 256;
        kw[j] = data_t'(k[j]);
      end
      for (int c = 0; c < W; c++) x[c] = int'($urandom % 1024) - 512;
      for (int c = 0; c < W; c++) begin
        w_en = (c == 0);
        if (c == 1) for (int j = 0; j < N; j++) kw[j] = data_t'($urandom);
        in_data = data_t'(x[c]);
        in_tag = '0;
        in_tag.valid = (c >= N - 1);
        if (c >= N - 1) begin
          s = 0;
          for (int j = 0; j < N; j++) s += longint'(k[j]) * x[c-N+1+j];
          exp_q.push_back(s);
          exp_t.push_back(cyc + N + 1);
        end
        @(negedge clk);
      end
      in_tag = '0;
      in_data = data_t'($urandom);     // garbage between rows is ignored
      repeat (1 + (r % 4 == 3 ? N + 3 : int'($urandom % 3))) @(negedge clk);
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
