// msgc_readout -- digital part of one MSGC/GEM readout chain: the VME board
// (pedestal subtraction, zero suppression, data memory, VME interface) and
// the Control Board sequencer that drives the analog front end.
//
// The DAQ sends two copies of the trigger and of the fast clear: `tv`/`fv`
// to the VME board and `tc`/`fc` to the Control Board, so that neither
// board waits for the other. The VME board forwards the control-sequence
// bits written by the host to the Control Board; the Control Board returns
// `eob` (end of busy) after resetting the front end, which releases BUSY on
// the VME board. The analog pipeline chips and the multiplexer/ADC are not
// logic: their control lines `apc_ctrl` and the current sequence step
// `cs_phase` are outputs, and the four digitised strip streams come back
// in on `dph`/`dph_valid` (one stream of 128 strips per segment).
// Timing: one 20 MHz clock for both boards (this design's choice; the
// boards have their own clocks). Trigger and fast-clear inputs must be at
// least one clock (50 ns) long and are synchronised inside.
module msgc_readout
  import msgc_pkg::*;
#(
  parameter int unsigned MEM_DEPTH   = 32768,
  parameter int unsigned STRIPS      = 128,
  parameter int unsigned LED_HOLD    = 1_000_000,
  parameter int unsigned LINES       = 1024,
  parameter int unsigned REREAD_DEF  = 240,
  parameter int unsigned READOUT_DEF = 256,
  parameter int unsigned RESET_DEF   = 20,
  parameter int unsigned AW          = $clog2(MEM_DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  // VME bus
  input  logic        as_n,
  input  logic [1:0]  ds_n,
  input  logic        write_n,
  input  logic [5:0]  am,
  input  logic [23:1] addr,
  input  logic [15:0] dat_i,
  output logic [15:0] dat_o,
  output logic        dat_oe,
  output logic        dtack_n,
  input  logic [5:0]  base_pins,
  output logic        led,
  // DAQ
  input  logic        tv,
  input  logic        fv,
  input  logic        tc,
  input  logic        fc,
  output logic        busy,
  // analog front end and digitiser
  output logic [CS_ROWS-1:0]    apc_ctrl,
  output cs_phase_e             cs_phase,
  output logic                  eob,
  input  logic [N_SEG-1:0]      dph_valid,
  input  logic [N_SEG-1:0][7:0] dph,
  // monitoring
  output seg_mode_e [N_SEG-1:0]   seg_mode,
  output logic [N_SEG-1:0][AW:0]  seg_nwords,
  output logic [N_SEG-1:0][15:0]  seg_ntrig,
  output logic [N_SEG-1:0]        seg_overflow,
  output logic                    cs_running
);

  logic dl_wr, dl_bit, tc_p, fc_p;

  vme_board #(.MEM_DEPTH(MEM_DEPTH), .STRIPS(STRIPS), .LED_HOLD(LED_HOLD)) u_vme (
    .clk, .rst_n, .as_n, .ds_n, .write_n, .am, .addr, .dat_i,
    .dat_o, .dat_oe, .dtack_n, .base_pins, .led,
    .tv, .fv, .busy, .eob, .dph_valid, .dph, .dl_wr, .dl_bit,
    .seg_mode, .seg_nwords, .seg_ntrig, .seg_overflow
  );

  pulse_sync u_tc (.clk, .rst_n, .in(tc), .pulse(tc_p));
  pulse_sync u_fc (.clk, .rst_n, .in(fc), .pulse(fc_p));

  cs_sequencer #(
    .LINES(LINES), .REREAD_DEF(REREAD_DEF), .READOUT_DEF(READOUT_DEF), .RESET_DEF(RESET_DEF)
  ) u_cs (
    .clk, .rst_n, .dl_wr, .dl_bit,
    .trig(tc_p), .fc(fc_p),
    .ctrl(apc_ctrl), .eob, .phase(cs_phase), .line(),
    .running(cs_running), .lines_loaded()
  );

endmodule
