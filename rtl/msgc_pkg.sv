// msgc_pkg -- types, constants and helper functions shared by the MSGC/GEM
// readout RTL (VME board, Control Board sequencer and their testbenches).
//
// The VME board is split in four segments of 128 strips each; every segment
// owns a 32 Kword data memory, a pedestal FIFO and a 13-bit
// threshold+status register. Numbers printed here (segment count, strips
// per segment, memory depth, command codes, register bit meanings, data-word
// layout, strip multiplexing order) follow the readout description; the
// internal bus record and the mode encoding are this design's own choice.
package msgc_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned N_SEG          = 4;      // segments per VME board
  localparam int unsigned STRIPS_PER_SEG = 128;    // strips per segment
  localparam int unsigned APC_PER_SEG    = 4;      // APC chips feeding one segment
  localparam int unsigned CH_PER_APC     = 32;     // channels read per APC
  localparam int unsigned MEM_WORDS      = 32768;  // 32 Kwords per segment
  localparam int unsigned CS_ROWS        = 32;     // control signals per sequence line

  // ------------------------------------------------ W8 command codes (BADD)
  localparam logic [7:0] CMD_RESET  = 8'd0;    // reset, memory to VME bus
  localparam logic [7:0] CMD_PEDRST = 8'd85;   // start pedestal FIFO reset/load
  localparam logic [7:0] CMD_ACQ    = 8'd170;  // memory to the Control Board (acquire)
  localparam logic [7:0] CMD_STOP   = 8'd255;  // stop acquisition, status check

  // ------------------------------------ byte offsets inside the 256 KB window
  localparam logic [17:0] OFF_CS_BIT = 18'h00001;  // W8: control sequence bit
  localparam logic [17:0] OFF_PED    = 18'h20001;  // W8: pedestal (daisy chain)

  // ----------------------------------------------- threshold+status register
  // bit 12    : 0 BUSY only while a trigger is processed, 1 also while memory full
  // bits 11:10: what an R16 of the segment returns in status mode
  // bit 9     : 0 count triggers arriving while BUSY, 1 do not
  // bit 8     : 0 fast-cleared triggers stay counted, 1 they are taken back
  // bits 7:0  : threshold on the pedestal-subtracted pulse height
  typedef enum logic [1:0] {
    RD_POINTER = 2'b00,   // bit11=0 bit10=0 : memory pointer (words written)
    RD_THRST   = 2'b01,   // bit11=0 bit10=1 : threshold+status register
    RD_NTRIG   = 2'b10,   // bit11=1 bit10=0 : trigger counter
    RD_ZERO    = 2'b11    // bit11=1 bit10=1 : constant 0
  } rd_sel_e;

  typedef struct packed {
    logic       busy_on_full;   // bit 12
    rd_sel_e    rd_sel;         // bits 11:10
    logic       no_inc_busy;    // bit 9
    logic       no_inc_fc;      // bit 8
    logic [7:0] thr;            // bits 7:0
  } thr_status_t;

  // --------------------------------------------------------- segment modes
  typedef enum logic [1:0] {
    MODE_VME    = 2'd0,   // memory read by the VME bus
    MODE_STATUS = 2'd1,   // acquisition stopped, R16 returns the status mux
    MODE_ACQ    = 2'd2,   // memory written by the acquisition
    MODE_PEDLD  = 2'd3    // pedestal FIFO being loaded
  } seg_mode_e;

  // ------------------------------------------- Control Board sequence steps
  typedef enum logic [1:0] {
    PH_SAMPLE  = 2'd0,   // front end sampling, waiting for a trigger
    PH_REREAD  = 2'd1,   // pipeline re-read at the trigger delay
    PH_READOUT = 2'd2,   // sequential readout of the channels
    PH_RESET   = 2'd3    // front-end reset, EOB at its end
  } cs_phase_e;

  // ---------------------------------------------- one decoded VME access
  typedef struct packed {
    logic        wr;        // 1 write, 0 read
    logic        byte_acc;  // 1 single byte (W8), 0 word (W16/R16)
    logic [17:0] off;       // byte offset inside the board window
    logic [15:0] wdata;     // W16 data, or the byte in [7:0] for W8
  } bus_req_t;

  // --------------------------------------------------- data memory words
  // header : {1, event number[14:0]}
  // data   : {0, strip in segment[6:0], pedestal-subtracted height[7:0]}
  function automatic logic [15:0] header_word(input logic [14:0] evn);
    return {1'b1, evn};
  endfunction

  function automatic logic [15:0] data_word(input logic [6:0] strip, input logic [7:0] pph);
    return {1'b0, strip, pph};
  endfunction

  // Order in which the four APCs of a segment appear on its multiplexed
  // line: APC0, APC2, APC1, APC3, then the next channel of each.
  function automatic logic [1:0] mux_apc(input logic [1:0] slot);
    case (slot)
      2'd0: return 2'd0;
      2'd1: return 2'd2;
      2'd2: return 2'd1;
      default: return 2'd3;
    endcase
  endfunction

  // VME strip number (arrival order, 0..511) to detector strip number.
  function automatic logic [8:0] vme_to_det_strip(input logic [8:0] vme_strip);
    logic [1:0] seg;
    logic [6:0] idx;
    seg = vme_strip[8:7];
    idx = vme_strip[6:0];
    return {seg, mux_apc(idx[1:0]), idx[6:2]};
  endfunction

endpackage
