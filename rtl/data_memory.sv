// data_memory -- one segment's event data memory: DEPTH words of 16 bits
// (32 Kwords by default, the size of each VME board segment).
//
// Single port, synchronous: when `we` is high the word `wdata` is written at
// `addr` on the rising clock edge; otherwise the word at `addr` appears on
// `rdata` one clock later. Only one user owns the port at a time (the
// acquisition while acquiring, the VME bus otherwise), so one port is
// enough. The port arrangement and the one-cycle read latency are this
// design's choice; the depth and word width are the board's.
module data_memory #(
  parameter int unsigned DEPTH = 32768,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [15:0]   wdata,
  output logic [15:0]   rdata
);

  logic [15:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    else    rdata     <= mem[addr];
  end

endmodule
