// access_decode -- turns one VME access into a board command.
//
// Offsets are byte offsets inside the 256 KB window. Bits 17:16 select the
// segment, whose 32 Kword memory starts at word position 0x0, 0x8000,
// 0x10000 or 0x18000 (byte offset 0x00000, 0x10000, 0x20000, 0x30000).
//   W8  offset 0x00000          command byte to all four segments
//   W8  offset 0x10000/20000/30000 command byte to segment 1/2/3 only
//   W8  offset 0x00001          one control-sequence bit (data bit 0) for the
//                               Control Board
//   W8  offset 0x20001          one pedestal byte into the daisy chain
//   W16 first word of segment   threshold+status register of that segment
//   R16 any word of segment     read of that segment (memory or status)
// Any other access is acknowledged and ignored.
// Purely combinational; outputs are valid while `req_valid` is high.
// The addresses and access types follow the board's command list. Sending
// a W8 at offset 0 to all segments, and one at a segment's base to that
// segment alone, is this design's reading of the command tables.
module access_decode
  import msgc_pkg::*;
(
  input  logic           req_valid,
  input  bus_req_t       req,
  output logic [N_SEG-1:0] cmd_wr,
  output logic [7:0]     cmd_val,
  output logic           cs_bit_wr,
  output logic           cs_bit,
  output logic           ped_wr,
  output logic [7:0]     ped_val,
  output logic [N_SEG-1:0] thr_wr,
  output thr_status_t    thr_val,
  output logic [N_SEG-1:0] rd,
  output logic [1:0]     rd_seg,
  output logic [14:0]    rd_idx
);

  logic [1:0] seg;
  assign seg     = req.off[17:16];
  assign cmd_val = req.wdata[7:0];
  assign cs_bit  = req.wdata[0];
  assign ped_val = req.wdata[7:0];
  assign thr_val = thr_status_t'(req.wdata[12:0]);
  assign rd_seg  = seg;
  assign rd_idx  = req.off[15:1];

  always_comb begin
    cmd_wr    = '0;
    cs_bit_wr = 1'b0;
    ped_wr    = 1'b0;
    thr_wr    = '0;
    rd        = '0;
    if (req_valid) begin
      if (req.wr && req.byte_acc) begin
        if (req.off == 18'h00000)              cmd_wr = '1;
        else if (req.off[15:0] == 16'h0000)    cmd_wr[seg] = 1'b1;
        else if (req.off == OFF_CS_BIT)        cs_bit_wr = 1'b1;
        else if (req.off == OFF_PED)           ped_wr = 1'b1;
      end else if (req.wr) begin
        if (req.off[15:0] == 16'h0000)         thr_wr[seg] = 1'b1;
      end else begin
        rd[seg] = 1'b1;
      end
    end
  end

endmodule
