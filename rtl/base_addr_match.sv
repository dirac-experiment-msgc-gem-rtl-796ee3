// base_addr_match -- board select for the 256 KB A24 window.
//
// The board answers when address bits A23..A18 equal the six base-address
// pins (pin 16 = A23 ... pin 11 = A18). A pin left open reads 1 and a
// grounded pin reads 0, so with no pin grounded the base is 0xFC0000; bases
// step by 0x040000. The access must also carry an A24 address modifier
// (0x39, 0x3A, 0x3D or 0x3E: non-privileged/supervisory, data/program).
// Purely combinational. The pin-to-bit assignment follows the board; the
// list of accepted address-modifier codes is this design's choice (only the
// A24 space is named).
module base_addr_match (
  input  logic [23:18] addr_hi,    // VME A23..A18
  input  logic [5:0]   am,         // VME address modifier
  input  logic [5:0]   base_pins,  // {pin16, pin15, pin14, pin13, pin12, pin11}
  output logic         match
);

  logic am_a24;

  always_comb begin
    unique case (am)
      6'h39, 6'h3A, 6'h3D, 6'h3E: am_a24 = 1'b1;
      default:                    am_a24 = 1'b0;
    endcase
    match = am_a24 && (addr_hi == base_pins);
  end

endmodule
