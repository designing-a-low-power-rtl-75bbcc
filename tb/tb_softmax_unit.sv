// tb_softmax_unit: self-checking test of the softmax unit.
// Random logit vectors (Q8.8, including ties, equal vectors and very spread
// vectors) are applied. Each probability is checked two ways: bit-exact
// against an integer model of the documented method (max subtraction,
// multiply by 369, 2^x from the 17-point table with linear interpolation,
// floor division of term*65536 by the sum, 65535 for 1.0), and within
// 0.006 of the real-valued softmax computed with $exp. The clock count from
// start to done is checked against 2 + N + (QW+1)*N with QW = 38.
module tb_softmax_unit;
  import lenet_pkg::*;
  localparam int N = 10;
  logic clk = 0, rst = 1, start = 0;
  data_t [N-1:0] logits;
  logic [N-1:0][15:0] probs;
  logic done;
  int checks = 0, failures = 0;

  softmax_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 15) $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask

  function automatic longint pow2_q15(int k);
    return longint'($floor(32768.0 * (2.0 ** (real'(k) / 16.0)) + 0.5));
  endfunction

  initial begin
    int l [N], mx, d, t, tq, n, f, cyc;
    longint lo, hi, fp, e [N], s, p;
    real rs, rp;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int v = 0; v < 40; v++) begin
      for (int i = 0; i < N; i++) begin
        case (v % 4)
          0: l[i] = int'($urandom % 2048) - 1024;        // within +-4
          1: l[i] = int'($urandom % 16384) - 14000;      // spread, mostly negative
          2: l[i] = 256 * (int'($urandom % 3) - 1);      // ties
          default: l[i] = -5000;                         // all equal
        endcase
        logits[i] = data_t'(l[i]);
      end
      // integer model
      mx = l[0];
      for (int i = 1; i < N; i++) if (l[i] > mx) mx = l[i];
      s = 0;
      for (int i = 0; i < N; i++) begin
        d  = l[i] - mx;
        t  = d * 369;
        tq = t >>> 8;
        n  = -(tq >>> 8);
        f  = tq & 255;
        lo = pow2_q15(f / 16);
        hi = pow2_q15(f / 16 + 1);
        fp = lo + (((hi - lo) * (f % 16)) >> 4);
        e[i] = (n >= 17) ? 0 : (fp >> n);
        s += e[i];
      end
      rs = 0.0;
      for (int i = 0; i < N; i++) rs += $exp(real'(l[i] - mx) / 256.0);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done && cyc < 2000) begin @(negedge clk); cyc++; end
      check("clocks start to done", cyc, 2 + N + 39 * N);
      for (int i = 0; i < N; i++) begin
        p = (e[i] * 65536) / s;
        if (p > 65535) p = 65535;
        check($sformatf("vector %0d prob %0d", v, i), longint'(probs[i]), p);
        rp = $exp(real'(l[i] - mx) / 256.0) / rs;
        checks++;
        if ((real'(probs[i]) / 65536.0 - rp) > 0.006 || (rp - real'(probs[i]) / 65536.0) > 0.006) begin
          failures++;
          $display("FAIL vector %0d prob %0d: %f, real softmax %f", v, i, real'(probs[i]) / 65536.0, rp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
