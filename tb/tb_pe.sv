// tb_pe: self-checking test of one Processing Element.
// Random inputs, weights, weight enables and partial sums are applied every
// clock. The expected Po and Io are computed from the definition
//   Po(e) = Pi(e) + W * I(e-1),  Io(e) = I(e-1)
// (I(e-1): the word sampled one edge earlier, now in the input register)
// where W is the last weight loaded with w_en, and compared every clock.
module tb_pe;
  import lenet_pkg::*;
  logic clk = 0, rst = 1, w_en = 0;
  data_t w_in = '0, i_in = '0, i_out;
  acc_t  p_in = '0, p_out;
  int checks = 0, failures = 0;

  pe dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint w = 0, i1 = 0, i2 = 0, exp_p;
    int n_hold = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      w_en = ($urandom % 4) == 0;
      w_in = data_t'($urandom);
      i_in = data_t'($urandom);
      p_in = acc_t'($urandom % 2000000) - 1000000;
      exp_p = longint'(p_in) + w * i1;     // value expected after the edge
      @(posedge clk);
      #1;
      checks++;
      if (p_out != acc_t'(exp_p)) begin
        failures++;
        if (failures < 10) $display("FAIL Po=%0d expected %0d", p_out, acc_t'(exp_p));
      end
      checks++;
      if (t >= 1 && i_out != data_t'(i1)) begin
        failures++;
        if (failures < 10) $display("FAIL Io=%0d expected %0d", i_out, i1);
      end
      if (!w_en) n_hold++;
      i2 = i1;
      i1 = longint'(i_in);
      if (w_en) w = longint'(w_in);
    end
    checks++;
    if (n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
