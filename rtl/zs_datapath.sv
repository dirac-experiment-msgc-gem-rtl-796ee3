// zs_datapath -- pedestal subtraction and zero suppression for one segment.
//
// Every digitised pulse height (DPH) that arrives while `enable` is high is
// numbered by a strip counter (the VME strip number inside the segment,
// 0..STRIPS-1, cleared by `start` at each trigger). The counter also
// addresses the pedestal store, so the pedestal of the same strip comes
// back one clock later. The physical pulse height is PPH = DPH - pedestal;
// when PPH >= threshold, the data word {0, strip[6:0], PPH[7:0]} is
// presented on `word`/`word_valid`.
//
// Timing: one DPH per clock is accepted; `word_valid` follows `dph_valid`
// by two clocks. DPHs beyond the STRIPS-th of an event are ignored.
// Subtraction, counting, comparison (>=) and the word layout follow the
// board description. A DPH below its pedestal gives PPH = 0 instead of
// wrapping around; that clamp, the two-stage pipeline and the 8-bit DPH
// width are this design's own choices.
module zs_datapath #(
  parameter int unsigned STRIPS = 128,
  parameter int unsigned SW     = $clog2(STRIPS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,        // new event: strip counter to 0
  input  logic          enable,       // accept DPHs (an event is in progress)
  input  logic          dph_valid,
  input  logic [7:0]    dph,
  input  logic [7:0]    thr,
  output logic [SW-1:0] ped_raddr,
  input  logic [7:0]    ped_rdata,
  output logic          word_valid,
  output logic [15:0]   word,
  output logic [SW:0]   strips_seen   // DPHs numbered in this event
);

  logic          s1_valid;
  logic [7:0]    s1_dph;
  logic [SW-1:0] s1_strip;
  logic          take;
  logic [7:0]    pph;

  assign take      = enable && dph_valid && (strips_seen < (SW+1)'(STRIPS));
  assign ped_raddr = strips_seen[SW-1:0];
  assign pph       = (s1_dph > ped_rdata) ? (s1_dph - ped_rdata) : 8'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      strips_seen <= '0;
      s1_valid    <= 1'b0;
      s1_dph      <= '0;
      s1_strip    <= '0;
      word_valid  <= 1'b0;
      word        <= '0;
    end else begin
      s1_valid <= take && !start;
      if (start)
        strips_seen <= '0;
      else if (take) begin
        strips_seen <= strips_seen + 1'b1;
        s1_dph      <= dph;
        s1_strip    <= strips_seen[SW-1:0];
      end
      word_valid <= s1_valid && (pph >= thr);
      word       <= {1'b0, 7'(s1_strip), pph};
    end
  end

endmodule
