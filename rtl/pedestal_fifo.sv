// pedestal_fifo -- pedestal store of one segment: DEPTH (128) bytes, one per
// strip, in the order the multiplexed strips arrive.
//
// Loading: the four segment stores form a daisy chain written through a
// single VME address. `load_rst` empties the store. A byte offered on
// `wr_in` is taken while the store is not full; once it is full the write
// strobe is passed on through `wr_out` to the next store of the chain, so the
// first 128 bytes fill segment 0, the next 128 segment 1, and so on.
// Reading: on every event the pedestals are needed again in the same order,
// so the store is read by the strip counter (`raddr`) instead of being
// emptied; this is equivalent to a FIFO whose output is written back to its
// input. `rdata` is valid one clock after `raddr`.
// The daisy chain and the arrival-order storage follow the board
// description; the full-flag cascade and the indexed read-back are this
// design's own way of doing them.
module pedestal_fifo #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load_rst,   // empty the store (command 85)
  input  logic          wr_in,      // pedestal byte offered to the chain
  input  logic [7:0]    wdata,
  output logic          wr_out,     // strobe passed to the next store
  output logic          full,
  output logic [AW:0]   count,      // pedestals held
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata
);

  logic [7:0] mem [DEPTH];

  assign full   = (count == (AW+1)'(DEPTH));
  assign wr_out = wr_in && full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                count <= '0;
    else if (load_rst)         count <= '0;
    else if (wr_in && !full)   count <= count + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_in && !full && !load_rst) mem[count[AW-1:0]] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
