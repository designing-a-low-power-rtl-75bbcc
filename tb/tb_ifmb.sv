// tb_ifmb: self-checking test of the input feature map buffer.
// Fills every word with a value derived from its address, overwrites a
// random subset, then reads all words back (one clock read latency) while
// also writing elsewhere, and checks that reads without rd_en hold rd_data.
module tb_ifmb;
  import lenet_pkg::*;
  localparam int D = 2048;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [10:0] wr_addr = '0, rd_addr = '0;
  data_t wr_data = '0, rd_data;
  int checks = 0, failures = 0;
  int model [D];

  ifmb dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t held;
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      model[a] = (a * 37 + 11) % 65536 - 32768;
      wr_en = 1; wr_addr = 11'(a); wr_data = data_t'(model[a]);
    end
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      wr_addr = 11'($urandom);
      wr_data = data_t'($urandom);
      model[wr_addr] = int'(wr_data);
    end
    @(negedge clk) wr_en = 0;
    for (int a = 0; a < D; a++) begin
      rd_en = 1; rd_addr = 11'(a);
      @(negedge clk);
      checks++;
      if (int'(rd_data) != model[a]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d: %0d expected %0d", a, rd_data, model[a]);
      end
    end
    held = rd_data;
    rd_en = 0; rd_addr = 0;
    @(negedge clk);
    checks++;
    if (rd_data != held) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
