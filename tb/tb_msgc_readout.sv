// tb_msgc_readout -- end-to-end run of the readout chain: VME board and
// Control Board sequencer, with a behavioural multiplexer/ADC feeding the
// four segment streams during each readout step. The data memory is cut to
// 128 words per segment so that it overflows within a few events; every
// other size is the design's own (512 strips, 240/256/20-clock sequence
// steps, 1024-line sequence RAM).
// The host runs the full operating procedure over VME: control-sequence
// download, pedestal load, threshold+status load, acquisition, board status
// check and memory read. Triggers and fast clears go to both boards as on
// the detector. Each mechanism is counted and must occur at least once:
// sequence download, pedestal daisy chain across all segments, acquired
// events, trigger during BUSY, fast clear during re-read, memory overflow
// with BUSY held (bit 12), each of the four status selections.
module tb_msgc_readout;
  import msgc_pkg::*;
  import tb_msgc_pkg::*;
  logic clk = 0;
  always #25 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int DEPTH = 128;
  localparam logic [23:0] BADD = 24'hFC0000;   // no pin grounded
  localparam logic [23:0] SO [4] = '{24'h00000, 24'h10000, 24'h20000, 24'h30000};

  logic rst_n, led, tv, fv, tc, fc, busy, eob, cs_running;
  logic [31:0]      apc_ctrl;
  cs_phase_e        cs_phase;
  logic [3:0]       dph_valid, seg_overflow;
  logic [3:0][7:0]  dph;
  seg_mode_e [3:0]  seg_mode;
  logic [3:0][7:0]  seg_nwords;
  logic [3:0][15:0] seg_ntrig;
  logic [15:0]      q;
  int               nread;

  vme_bus_if bus (clk);

  msgc_readout #(.MEM_DEPTH(DEPTH), .LED_HOLD(100)) dut (
    .clk, .rst_n, .as_n(bus.as_n), .ds_n(bus.ds_n), .write_n(bus.write_n), .am(bus.am),
    .addr(bus.addr), .dat_i(bus.dat_m), .dat_o(bus.dat_s), .dat_oe(bus.dat_oe),
    .dtack_n(bus.dtack_n), .base_pins(6'b111111), .led, .tv, .fv, .tc, .fc, .busy,
    .apc_ctrl, .cs_phase, .eob, .dph_valid, .dph,
    .seg_mode, .seg_nwords, .seg_ntrig, .seg_overflow, .cs_running);

  mux_adc_model adc (.clk, .phase(cs_phase), .dph_valid, .dph, .nread);

  logic [15:0] model [4][$];
  int ntrig_ref = 0;
  // mechanism counters
  int n_frames = 0, n_ped = 0, n_events = 0, n_busy_trig = 0, n_fc = 0;
  int n_overflow = 0, n_busy_full = 0, n_eob = 0;
  int n_sel [4] = '{0, 0, 0, 0};

  always @(posedge clk) if (eob) n_eob++;

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send_frame(input logic [3:0] op, input logic [31:0] payload);
    logic [35:0] f;
    f = {op, payload};
    for (int i = 35; i >= 0; i--) bus.w8(BADD + 1, 8'(f[i]));
    n_frames++;
  endtask

  // trigger (and optionally fast clear) to both boards
  task automatic trigger(input logic with_fc);
    @(negedge clk); tv = 1; tc = 1;
    repeat (3) @(negedge clk);
    tv = 0; tc = 0;
    if (with_fc) begin
      repeat (40) @(negedge clk);
      fv = 1; fc = 1;
      repeat (3) @(negedge clk);
      fv = 0; fc = 0;
    end
  endtask

  // one event through the whole chain; returns when the sequencer is back
  // to sampling
  task automatic event_run(input logic with_fc, input logic [7:0] thr);
    int r, e0;
    logic was_busy;
    was_busy = busy;
    r = nread;
    e0 = n_eob;
    trigger(with_fc);
    repeat (4) @(negedge clk);
    if (was_busy) begin
      n_busy_trig++;
      ntrig_ref++;
      check(busy, "BUSY dropped during a busy trigger");
      // the Control Board does not see the VME board's BUSY and runs its
      // sequence; the VME board ignores the data of this trigger
      while (n_eob == e0) @(negedge clk);
      repeat (3) @(negedge clk);
      return;
    end
    ntrig_ref++;
    check(busy, "BUSY not raised");
    for (int s = 0; s < 4; s++) if (model[s].size() < DEPTH) model[s].push_back({1'b1, 15'(ntrig_ref)});
    while (n_eob == e0) @(negedge clk);
    repeat (3) @(negedge clk);
    if (with_fc) begin
      n_fc++;
      for (int s = 0; s < 4; s++) void'(model[s].pop_back());
      check(nread == r, "readout ran after fast clear");
    end else begin
      n_events++;
      check(nread == r + 1, "no readout");
      for (int s = 0; s < 4; s++)
        for (int i = 0; i < 128; i++)
          if (pph_value(r, s, i) >= thr && model[s].size() < DEPTH)
            model[s].push_back({1'b0, 7'(i), pph_value(r, s, i)});
    end
    if (|seg_overflow) n_overflow++;
  endtask

  task automatic status_sel(input int s, input logic [15:0] reg_v, input rd_sel_e sel,
                            input logic [15:0] exp_v, input string what);
    bus.w16(BADD + SO[s], reg_v | (16'(sel) << 10));
    bus.r16(BADD + SO[s], q);
    check(q == exp_v, $sformatf("segment %0d %s = %0d expected %0d", s, what, q, exp_v));
    n_sel[sel]++;
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1; #1 rst_n = 0;
    tv = 0; fv = 0; tc = 0; fc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // control sequence: a few lines, default step lengths, running mode
    send_frame(4'd0, 32'd0);
    for (int k = 0; k < 16; k++) send_frame(4'd1, 32'hF0F00000 | 32'(k));
    send_frame(4'd3, 32'd240);
    send_frame(4'd4, {16'd256, 16'd20});
    check(cs_running, "Control Board not in running mode");
    @(negedge clk);
    check(apc_ctrl == 32'hF0F00000, "sampling line not on the control outputs");

    // pedestals through the daisy chain
    bus.w8(BADD, CMD_RESET);
    bus.w8(BADD, CMD_PEDRST);
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < 128; i++) begin
        bus.w8(BADD + 24'h20001, ped_value(s, i));
        n_ped++;
      end

    // threshold 10; bit 12 = 1 (BUSY held on full memory), bits 8, 9 = 0
    bus.w8(BADD, CMD_RESET);
    bus.w8(BADD, CMD_STOP);
    bus.w16(BADD, 16'h100A);
    for (int s = 1; s < 4; s++) begin
      bus.w8(BADD + SO[s], CMD_STOP);
      bus.w16(BADD + SO[s], 16'h100A);
    end
    bus.w8(BADD, CMD_ACQ);

    event_run(0, 8'd10);
    event_run(1, 8'd10);      // fast clear during re-read
    for (int k = 0; k < 12 && !(&seg_overflow); k++) event_run(0, 8'd10);
    check(&seg_overflow, "memory never overflowed");
    check(busy, "BUSY not held on full memory");
    if (busy) n_busy_full++;
    event_run(0, 8'd10);      // trigger while BUSY

    // board status check: walk all four selections on every segment
    bus.w8(BADD, CMD_STOP);
    for (int s = 0; s < 4; s++) begin
      status_sel(s, 16'h100A, RD_THRST,   16'h140A, "register");
      status_sel(s, 16'h100A, RD_NTRIG,   16'(ntrig_ref), "triggers");
      status_sel(s, 16'h100A, RD_POINTER, 16'(model[s].size()), "words");
      status_sel(s, 16'h100A, RD_ZERO,    16'd0, "zero");
    end

    // memory read
    bus.w8(BADD, CMD_RESET);
    check(!busy, "BUSY still high after reset");
    for (int s = 0; s < 4; s++)
      foreach (model[s][i]) begin
        bus.r16(BADD + SO[s] + 24'(2 * i), q);
        check(q == model[s][i], $sformatf("segment %0d word %0d = %h expected %h", s, i, q, model[s][i]));
      end

    $display("mechanisms: frames=%0d pedestals=%0d events=%0d busy_triggers=%0d fast_clears=%0d overflows=%0d busy_full=%0d status_sel=%0d/%0d/%0d/%0d",
             n_frames, n_ped, n_events, n_busy_trig, n_fc, n_overflow, n_busy_full,
             n_sel[0], n_sel[1], n_sel[2], n_sel[3]);
    check(n_frames > 0 && n_ped == 512 && n_events > 0 && n_busy_trig > 0 && n_fc > 0 &&
          n_overflow > 0 && n_busy_full > 0 && n_sel[0] > 0 && n_sel[1] > 0 && n_sel[2] > 0 &&
          n_sel[3] > 0, "a mechanism never happened");
    check(!bus.berr, "bus error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
