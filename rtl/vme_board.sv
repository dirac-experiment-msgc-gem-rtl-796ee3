// vme_board -- the VME readout board of one MSGC/GEM plane: pedestal
// subtraction and zero suppression of 512 strips in four independent
// segments of 128.
//
// The VME A24/D16 slave (vme_slave) hands each access to access_decode,
// which produces segment commands, threshold+status writes, segment reads,
// pedestal bytes and control-sequence bits. Pedestal bytes enter the daisy
// chain at segment 0 and flow on to segments 1, 2, 3 as each store fills.
// Control-sequence bits go out on `dl_wr`/`dl_bit` to the Control Board. The
// trigger (`tv`) and fast clear (`fv`) copies for this board are
// synchronised here and go to all four segments together with `eob` from
// the Control Board; segment s takes the digitised pulse heights
// `dph[s]`/`dph_valid[s]` of its cable. BUSY is high while any segment is
// busy.
// Timing: all logic runs on the 20 MHz board clock; an R16 returns data
// READ_LAT = 2 clocks after the decoded access (segment read, then the
// board's read register).
// Following the board: the division in four segments, the daisy-chained
// pedestal load, the command set and the BUSY output. This design's own:
// the single clock, parallel 8-bit DPH inputs with a valid strobe per
// cable, a bit-plus-strobe download line, and BUSY as the OR of the
// segments.
module vme_board
  import msgc_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 32768,
  parameter int unsigned STRIPS    = 128,
  parameter int unsigned LED_HOLD  = 1_000_000,
  parameter int unsigned AW        = $clog2(MEM_DEPTH)
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
  // DAQ signals
  input  logic        tv,
  input  logic        fv,
  output logic        busy,
  // Control Board link
  input  logic        eob,
  input  logic [N_SEG-1:0]      dph_valid,
  input  logic [N_SEG-1:0][7:0] dph,
  output logic        dl_wr,
  output logic        dl_bit,
  // monitoring
  output seg_mode_e [N_SEG-1:0]   seg_mode,
  output logic [N_SEG-1:0][AW:0]  seg_nwords,
  output logic [N_SEG-1:0][15:0]  seg_ntrig,
  output logic [N_SEG-1:0]        seg_overflow
);


  bus_req_t          req;
  logic              req_valid;
  logic [15:0]       rdata_q;
  logic [N_SEG-1:0]  cmd_wr, thr_wr, rd, seg_busy;
  logic [7:0]        cmd_val, ped_val;
  logic              ped_wr;
  thr_status_t       thr_val;
  logic [1:0]        rd_seg, rd_seg_q;
  logic [14:0]       rd_idx;
  logic [N_SEG:0]    ped_chain;
  logic [N_SEG-1:0][15:0] seg_rdata;
  logic              trig, fc;

  vme_slave #(.READ_LAT(2), .LED_HOLD(LED_HOLD)) u_slave (
    .clk, .rst_n, .as_n, .ds_n, .write_n, .am, .addr, .dat_i,
    .dat_o, .dat_oe, .dtack_n, .base_pins, .led,
    .req_valid, .req, .rdata(rdata_q)
  );

  access_decode u_dec (
    .req_valid, .req, .cmd_wr, .cmd_val,
    .cs_bit_wr(dl_wr), .cs_bit(dl_bit),
    .ped_wr, .ped_val, .thr_wr, .thr_val, .rd, .rd_seg, .rd_idx
  );

  pulse_sync u_tv (.clk, .rst_n, .in(tv), .pulse(trig));
  pulse_sync u_fv (.clk, .rst_n, .in(fv), .pulse(fc));

  assign ped_chain[0] = ped_wr;

  for (genvar s = 0; s < N_SEG; s++) begin : g_seg
    vme_segment #(.MEM_DEPTH(MEM_DEPTH), .STRIPS(STRIPS)) u_seg (
      .clk, .rst_n,
      .cmd_wr    (cmd_wr[s]),
      .cmd_val   (cmd_val),
      .thr_wr    (thr_wr[s]),
      .thr_val   (thr_val),
      .rd        (rd[s]),
      .rd_idx    (rd_idx),
      .rdata     (seg_rdata[s]),
      .ped_wr_in (ped_chain[s]),
      .ped_val   (ped_val),
      .ped_wr_out(ped_chain[s+1]),
      .trig      (trig),
      .fc        (fc),
      .eob       (eob),
      .dph_valid (dph_valid[s]),
      .dph       (dph[s]),
      .busy      (seg_busy[s]),
      .mode      (seg_mode[s]),
      .nwords    (seg_nwords[s]),
      .ntrig     (seg_ntrig[s]),
      .overflow  (seg_overflow[s]),
      .thr_st    (),
      .ped_count (),
      .strips_seen()
    );
  end

  // read register: the addressed segment's word, one clock after its read
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_seg_q <= '0;
      rdata_q  <= '0;
    end else begin
      if (|rd) rd_seg_q <= rd_seg;
      rdata_q <= seg_rdata[rd_seg_q];
    end
  end

  assign busy = |seg_busy;

endmodule
