// pe_array: the chain of N Processing Elements (five for LeNet-1's 5x5
// kernels) that computes one kernel row of a convolution per pass.
//
// PE k takes its input word from the Io output of PE k-1 and its previous
// partial sum Pi from the Po output of PE k-1; PE 0 takes the array input
// and a zero partial sum, and the Po of the last PE is the array output.
// Inputs move two registers per PE and partial sums one, so the last PE
// emits, for a row x streamed one word per clock,
//     y[c] = sum_{j=0}^{N-1} kw[j] * x[c-N+1+j]
// i.e. the valid correlation of the row with the kernel row kw (kw[0] meets
// the oldest word of the window). The array maps kw[j] onto PE N-1-j for this.
//
// Interface: w_en is raised together with the first word of a pass on
// in_data, and kw (a whole kernel row from the weight buffer) is captured
// then. Each PE switches to its new weight exactly when that first word
// reaches its input register: PE k 2k clocks later, through a delay line on
// w_en. Words of the previous pass still in the array keep meeting the old
// weights, so passes can follow each other without draining the array; they
// need only a gap of at least one clock, and two w_en pulses must be at
// least 2N-1 clocks apart. The array never stalls; in_tag travels beside the data
// through an N+1 stage shift register, so out_tag belongs to out_psum, whose
// newest window word entered N+1 clocks earlier.
//
// From the design description: five PEs in a line, each PE's output feeding
// the next, in a pipelined architecture. This design's choices: the skewed
// (2:1) register timing that makes the chain a convolution, the staggered
// weight load that lets passes overlap, and the tag path.
module pe_array
  import lenet_pkg::*;
#(
  parameter int unsigned N  = K,       // number of PEs = kernel width
  parameter int unsigned DW = DATA_W,
  parameter int unsigned AW = ACC_W
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        w_en,
  input  logic signed [N-1:0][DW-1:0] kw,       // kernel row, kw[0] = leftmost tap
  input  logic signed [DW-1:0]        in_data,
  input  tag_t                        in_tag,
  output logic signed [AW-1:0]        out_psum,
  output tag_t                        out_tag
);

  logic signed [DW-1:0] i_chain [N+1];
  logic signed [AW-1:0] p_chain [N+1];
  tag_t                 tag_sr  [N+1];

  logic signed [N-1:0][DW-1:0] kw_hold;   // kernel row of the current pass
  logic [2*N-2:1]              w_sr;      // w_sr[s]: w_en of s clocks ago

  always_ff @(posedge clk) begin
    if (rst) w_sr <= '0;
    else     w_sr <= {w_sr[2*N-3:1], w_en};
    if (w_en) kw_hold <= kw;
  end

  assign i_chain[0] = in_data;
  assign p_chain[0] = '0;

  for (genvar k = 0; k < N; k++) begin : g_pe
    pe #(.DW(DW), .AW(AW)) u_pe (
      .clk  (clk),
      .rst  (rst),
      .w_en ((k == 0) ? w_en : w_sr[2*k]),
      .w_in ((k == 0) ? kw[N-1] : kw_hold[N-1-k]),
      .i_in (i_chain[k]),
      .p_in (p_chain[k]),
      .i_out(i_chain[k+1]),
      .p_out(p_chain[k+1])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s <= N; s++) tag_sr[s] <= '0;
    end else begin
      tag_sr[0] <= in_tag;
      for (int s = 1; s <= N; s++) tag_sr[s] <= tag_sr[s-1];
    end
  end

  assign out_psum = p_chain[N];
  assign out_tag  = tag_sr[N];

endmodule
