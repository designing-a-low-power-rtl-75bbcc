// softmax_unit: turns the class scores of the FC layer into probabilities,
//     p_i = exp(l_i) / sum_j exp(l_j).
//
// Fixed-point method: the largest logit is subtracted first, so every
// exponent is <= 0 and the largest term is exactly 1.0. exp(d) is computed
// as 2^(d*log2 e): d (Q8.8) is multiplied by round(256*log2 e) = 369 and
// split into an integer part n <= 0 and a fraction f in [0,1). 2^f comes
// from a 17-point table of round(32768 * 2^(k/16)), k = 0..16, with linear
// interpolation between points, and is shifted right by -n. The terms
// (Q1.15, 1.0 = 32768) are summed, and each term is divided by the sum with
// a bit-serial restoring divider, giving p_i in Q0.16 (65535 stands for 1.0).
//
// Interface: start (one clock) latches logits; done pulses when probs are
// valid; they stay until the next start. Timing: 1 clock for the maximum,
// N clocks for the exponentials (one per class), then 39 clocks per class
// for the division (38 quotient steps and one to store the result):
// 2 + N + 39*N clocks from start to done (402 for N = 10).
//
// The description says only that a softmax turns the FC outputs into
// probabilities; the base-2 evaluation, table, widths and serial divider
// are this design's choices.
module softmax_unit
  import lenet_pkg::*;
#(
  parameter int unsigned N = 10
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  data_t [N-1:0]     logits,
  output logic  [N-1:0][15:0] probs,
  output logic              done
);

  localparam int unsigned NW    = $clog2(N);
  localparam int unsigned LOG2E = 369;        // round(256 * log2(e))
  localparam int unsigned SW    = 17 + NW + 1; // width of the sum of terms
  localparam int unsigned QW    = 16 + SW;     // dividend width

  // 2^(k/16) in Q1.15, k = 0..16
  localparam logic [16:0] POW2 [17] = '{
    17'd32768, 17'd34219, 17'd35734, 17'd37316, 17'd38968, 17'd40693,
    17'd42495, 17'd44376, 17'd46341, 17'd48393, 17'd50535, 17'd52773,
    17'd55109, 17'd57549, 17'd60097, 17'd62757, 17'd65536};

  typedef enum logic [1:0] {S_IDLE, S_MAX, S_EXP, S_DIV} sm_state_e;

  sm_state_e       state;
  data_t           lat [N];
  data_t           mx;
  logic [16:0]     term [N];
  logic [SW-1:0]   sum;
  logic [NW-1:0]   idx;
  logic [5:0]      bitn;
  logic [QW-1:0]   num;
  logic [SW-1:0]   rem;           // remainder, always below sum
  logic [16:0]     quo;

  // exponential of lat[idx] - mx
  logic signed [16:0] d;
  logic signed [26:0] t;
  logic signed [18:0] tq;          // Q8.8, <= 0
  logic [7:0]         f;
  logic [10:0]        nshift;      // -floor(t)
  logic [16:0]        lo_pt, hi_pt, frac_pow, e_term;
  logic [21:0]        interp;

  always_comb begin
    d        = 17'(lat[idx]) - 17'(mx);
    t        = 27'(d) * 27'(LOG2E);
    tq       = 19'(t >>> 8);
    f        = tq[7:0];
    nshift   = 11'(-(tq >>> 8));
    lo_pt    = POW2[5'(f[7:4])];
    hi_pt    = POW2[5'(f[7:4]) + 5'd1];
    interp   = 22'(hi_pt - lo_pt) * 22'(f[3:0]);
    frac_pow = lo_pt + 17'(interp >> 4);
    e_term   = (nshift >= 11'd17) ? 17'd0 : (frac_pow >> nshift);
  end

  // maximum of the latched logits
  data_t mx_c;
  always_comb begin
    mx_c = lat[0];
    for (int i = 1; i < N; i++) if (lat[i] > mx_c) mx_c = lat[i];
  end

  // one restoring division step
  logic [SW:0] rem_sh;
  always_comb rem_sh = {rem, num[QW-1]};

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      done  <= 1'b0;
      idx   <= '0;
      sum   <= '0;
      mx    <= '0;
      bitn  <= '0;
      num   <= '0;
      rem   <= '0;
      quo   <= '0;
      probs <= '0;
      for (int i = 0; i < N; i++) begin
        lat[i]  <= '0;
        term[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          for (int i = 0; i < N; i++) lat[i] <= logits[i];
          state <= S_MAX;
        end
        S_MAX: begin
          mx    <= mx_c;
          idx   <= '0;
          sum   <= '0;
          state <= S_EXP;
        end
        S_EXP: begin
          term[idx] <= e_term;
          sum       <= sum + SW'(e_term);
          if (idx == NW'(N - 1)) begin
            idx   <= '0;
            bitn  <= '0;
            num   <= {QW'(term[0]) << 16};
            rem   <= '0;
            quo   <= '0;
            state <= S_DIV;
          end else idx <= idx + 1'b1;
        end
        S_DIV: begin
          if (bitn != 6'(QW)) begin
            num  <= num << 1;
            bitn <= bitn + 1'b1;
            if (rem_sh >= {1'b0, sum}) begin
              rem <= SW'(rem_sh - {1'b0, sum});
              quo <= {quo[15:0], 1'b1};
            end else begin
              rem <= SW'(rem_sh);
              quo <= {quo[15:0], 1'b0};
            end
          end else begin
            probs[idx] <= (quo[16]) ? 16'hFFFF : quo[15:0];
            bitn <= '0;
            rem  <= '0;
            quo  <= '0;
            if (idx == NW'(N - 1)) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              num <= QW'(term[idx + 1'b1]) << 16;
              idx <= idx + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
