// tb_idb: self-checking test of the intermediate data buffer.
// A memory model with one clock of read latency stands in for the IFMB. The
// testbench requests random rows (start address, length 1..28) whenever the
// IDB can take a fetch, and starts streaming whenever a row is ready, both
// after random delays, so that fetching and streaming overlap. Every row
// must be streamed exactly once, in request order, word by word on
// consecutive clocks starting the clock after go, with its column index and
// done on the last word. A fetch into an idle IDB must make row_ready rise
// len+2 clocks after the edge that takes start. The testbench also checks
// that both row stores fill up (fetch_ready low while neither is streaming)
// and that fetching and streaming overlapped.
module tb_idb;
  import lenet_pkg::*;
  localparam int MW = 28, D = 2048, NROWS = 80;
  logic clk = 0, rst = 1, start = 0, go = 0;
  logic [10:0] base = '0;
  logic [4:0] len = '0;
  logic fetch_ready, row_ready, ifmb_rd_en, out_valid, done;
  logic [10:0] ifmb_rd_addr;
  data_t ifmb_rd_data, out_data;
  logic [4:0] out_col;
  int checks = 0, failures = 0;
  data_t mem [D];

  idb dut (.*);
  always #5 clk = ~clk;

  always_ff @(posedge clk) if (ifmb_rd_en) ifmb_rd_data <= mem[ifmb_rd_addr];

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 10) $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask

  int q_base[$], q_len[$];
  int n_full = 0, n_overlap = 0;
  always @(posedge clk) if (!rst) begin
    if (!fetch_ready && !out_valid && row_ready && !dut.fetching) n_full++;
    if (ifmb_rd_en && out_valid) n_overlap++;
  end

  // requester
  initial begin : req
    int b, l, n;
    for (int a = 0; a < D; a++) mem[a] = data_t'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // first fetch into an idle IDB: check the fill time
    b = 100; l = MW;
    start = 1; base = 11'(b); len = 5'(l);
    q_base.push_back(b); q_len.push_back(l);
    @(negedge clk) start = 0;
    n = 1;
    while (!row_ready && n < 100) begin @(negedge clk); n++; end
    check("fill time", n, l + 3);   // n counts from 1 at the start edge
    for (int t = 1; t < NROWS; t++) begin
      l = (t == 1) ? 1 : 1 + int'($urandom % MW);
      b = int'($urandom % (D - MW));
      while (!fetch_ready) @(negedge clk);
      start = 1; base = 11'(b); len = 5'(l);
      q_base.push_back(b); q_len.push_back(l);
      @(negedge clk) start = 0;
      repeat (int'($urandom % 4)) @(negedge clk);
    end
  end

  // consumer
  initial begin : cons
    int b, l, got = 0;
    @(negedge clk);
    while (got < NROWS) begin
      while (!row_ready) @(negedge clk);
      if (got > 10 && got < 20) repeat (40) @(negedge clk);   // let both stores fill
      repeat (int'($urandom % 3)) @(negedge clk);
      go = 1;
      @(negedge clk) go = 0;
      b = q_base.pop_front();
      l = q_len.pop_front();
      for (int k = 0; k < l; k++) begin
        check("valid", int'(out_valid), 1);
        check("word", int'(out_data), int'(mem[b + k]));
        check("column", int'(out_col), k);
        check("done", int'(done), int'(k == l - 1));
        @(negedge clk);
      end
      check("stream ends", int'(out_valid), 0);
      got++;
    end
    checks += 2;
    if (n_full == 0) begin failures++; $display("FAIL both stores never full"); end
    if (n_overlap == 0) begin failures++; $display("FAIL fetch never overlapped a stream"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
