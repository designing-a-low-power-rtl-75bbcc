// sync_fifo: single-clock first-in first-out store used as the partial sum
// FIFO of the accumulation block and the residual FIFO of the pooling block.
//
// A circular array with read and write pointers. rd_data always shows the
// oldest entry (show-ahead), so a block can read the head, combine it with a
// new value and pop it in the same clock. Push and pop may happen together.
// Pushing into a full FIFO or popping an empty one is a protocol error and
// is caught by assertions; the FIFO is sized by its users so that neither
// happens. clear empties it synchronously.
module sync_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 24
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clear,
  input  logic         push,
  input  logic [W-1:0] wr_data,
  input  logic         pop,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic [PW:0]   cnt;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  assign rd_data = mem[rp];
  assign empty   = (cnt == '0);
  assign full    = (cnt == (PW+1)'(DEPTH));

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      cnt <= cnt + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst || clear) push && !pop |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (rst || clear) pop |-> !empty);

endmodule
