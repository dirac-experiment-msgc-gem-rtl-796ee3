// pulse_sync -- brings an asynchronous trigger-type pulse into the 20 MHz
// clock domain: two flip-flops against metastability, then a rising-edge
// detector, so every input pulse (at least 50 ns, one clock period, long)
// gives exactly one `pulse` of one clock, two to three clocks after the
// input edge. The synchroniser is this design's choice; the 50 ns minimum
// width it relies on is the readout's specification.
module pulse_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic in,
  output logic pulse
);

  logic [2:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else        sr <= {sr[1:0], in};
  end

  assign pulse = sr[1] && !sr[2];

endmodule
