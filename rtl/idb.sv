// idb: Intermediate Data Buffer between the IFMB and the PE array.
//
// The IDB holds two row stores so that fetching one input row from the IFMB
// overlaps with streaming the previous row into the PE array.
//  - Fetch side: when a row store is free (fetch_ready), start with base and
//    len makes the IDB read that row of the input map from the IFMB, one word
//    per clock (len reads and two clocks to finish), into the free store.
//  - Stream side: when a filled row is waiting (row_ready), go plays it out
//    one word per clock, left to right, with its column index; done marks the
//    last word, after which the store is free again.
// Rows are streamed in the order they were fetched.
//
// Interface: start/base/len/fetch_ready for fetch requests; go/row_ready for
// streaming; ifmb_rd_en/ifmb_rd_addr/ifmb_rd_data to the IFMB (one clock read
// latency); out_valid/out_data/out_col/done to the PE array. out_valid
// starts the clock after go and lasts len clocks.
//
// From the design description: the IDB orders data from the IFMB before it
// goes to the PEs, each of its rows matching a row of the processing
// elements, in a pipelined accelerator. This design's choices: two row
// stores of MAX_W words used alternately, and the handshake.
module idb
  import lenet_pkg::*;
#(
  parameter int unsigned MAX_W = 28,              // longest input row
  parameter int unsigned AW    = 11,              // IFMB address width
  parameter int unsigned CW    = $clog2(MAX_W+1)  // column / length width
) (
  input  logic          clk,
  input  logic          rst,
  // fetch requests
  input  logic          start,
  input  logic [AW-1:0] base,
  input  logic [CW-1:0] len,
  output logic          fetch_ready,
  // IFMB read port
  output logic          ifmb_rd_en,
  output logic [AW-1:0] ifmb_rd_addr,
  input  data_t         ifmb_rd_data,
  // stream to the PE array
  output logic          row_ready,
  input  logic          go,
  output logic          out_valid,
  output data_t         out_data,
  output logic [CW-1:0] out_col,
  output logic          done
);

  data_t         row  [2][MAX_W];
  logic [CW-1:0] blen [2];
  logic [1:0]    full;

  // fetch side
  logic          fetching, wsel, cap_en;
  logic [AW-1:0] rbase;
  logic [CW-1:0] flen, fcnt, cap_idx;
  logic          fill_done;

  // stream side
  logic          streaming, rsel;
  logic [CW-1:0] scnt;

  assign fetch_ready  = !fetching && !full[wsel];
  assign ifmb_rd_en   = fetching && (fcnt < flen);
  assign ifmb_rd_addr = rbase + AW'(fcnt);
  assign fill_done    = fetching && (fcnt == flen) && !cap_en;

  assign row_ready = full[rsel] && !streaming;
  assign out_valid = streaming;
  assign out_data  = row[rsel][scnt];
  assign out_col   = scnt;
  assign done      = streaming && (scnt == blen[rsel] - 1'b1);

  always_ff @(posedge clk) begin
    if (cap_en) row[wsel][cap_idx] <= ifmb_rd_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      full      <= '0;
      fetching  <= 1'b0;
      wsel      <= 1'b0;
      rbase     <= '0;
      flen      <= '0;
      fcnt      <= '0;
      cap_en    <= 1'b0;
      cap_idx   <= '0;
      streaming <= 1'b0;
      rsel      <= 1'b0;
      scnt      <= '0;
      blen[0]   <= '0;
      blen[1]   <= '0;
    end else begin
      cap_en  <= ifmb_rd_en;
      cap_idx <= fcnt;
      // fetch
      if (start && fetch_ready) begin
        fetching <= 1'b1;
        rbase    <= base;
        flen     <= len;
        fcnt     <= '0;
      end else if (fetching) begin
        if (fcnt < flen) fcnt <= fcnt + 1'b1;
        else if (fill_done) begin
          fetching   <= 1'b0;
          blen[wsel] <= flen;
          wsel       <= !wsel;
        end
      end
      // stream
      if (go && row_ready) begin
        streaming <= 1'b1;
        scnt      <= '0;
      end else if (streaming) begin
        if (done) begin
          streaming <= 1'b0;
          rsel      <= !rsel;
        end else scnt <= scnt + 1'b1;
      end
      // store occupancy: set when filled, cleared after its last word
      for (int b = 0; b < 2; b++) begin
        if (fill_done && wsel == 1'(b))            full[b] <= 1'b1;
        else if (streaming && done && rsel == 1'(b)) full[b] <= 1'b0;
      end
    end
  end

  a_len_ok:   assert property (@(posedge clk) disable iff (rst) start && fetch_ready |-> (len != 0) && (len <= CW'(MAX_W)));
  a_go_ready: assert property (@(posedge clk) disable iff (rst) go |-> row_ready);

endmodule
