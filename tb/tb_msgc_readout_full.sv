// tb_msgc_readout_full -- one complete operation of the readout chain with
// every size at its default: 32 Kword memories, 128 strips per segment, a
// 1024-line sequence RAM. The host downloads a full control sequence
// (sampling line, 240 re-read, 256 readout and 20 reset lines), loads the
// 512 pedestals and the thresholds, starts acquisition, sends one trigger
// to both boards, and after EOB checks the status words and reads every
// data word back. The control lines seen by the front end during the event
// must be the downloaded lines in order, and BUSY must last from the
// trigger to EOB: 240 + 256 + 20 clocks of sequence plus the trigger
// synchronisation.
module tb_msgc_readout_full;
  import msgc_pkg::*;
  import tb_msgc_pkg::*;
  logic clk = 0;
  always #25 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [23:0] BADD = 24'hEC0000;   // pin 13 grounded
  localparam logic [23:0] SO [4] = '{24'h00000, 24'h10000, 24'h20000, 24'h30000};
  localparam int NLINES = 1 + 240 + 256 + 20;

  logic rst_n, led, tv, fv, tc, fc, busy, eob, cs_running;
  logic [31:0]      apc_ctrl;
  cs_phase_e        cs_phase;
  logic [3:0]       dph_valid, seg_overflow;
  logic [3:0][7:0]  dph;
  seg_mode_e [3:0]  seg_mode;
  logic [3:0][15:0] seg_nwords;
  logic [3:0][15:0] seg_ntrig;
  logic [15:0]      q;
  int               nread;

  vme_bus_if bus (clk);

  msgc_readout dut (
    .clk, .rst_n, .as_n(bus.as_n), .ds_n(bus.ds_n), .write_n(bus.write_n), .am(bus.am),
    .addr(bus.addr), .dat_i(bus.dat_m), .dat_o(bus.dat_s), .dat_oe(bus.dat_oe),
    .dtack_n(bus.dtack_n), .base_pins(6'b111011), .led, .tv, .fv, .tc, .fc, .busy,
    .apc_ctrl, .cs_phase, .eob, .dph_valid, .dph,
    .seg_mode, .seg_nwords, .seg_ntrig, .seg_overflow, .cs_running);

  mux_adc_model adc (.clk, .phase(cs_phase), .dph_valid, .dph, .nread);

  function automatic logic [31:0] line_pattern(input int k);
    return {8'hC5, 8'(k * 3), 16'(k)};
  endfunction

  logic [15:0] model [4][$];
  logic [31:0] seen [$];
  int busy_clocks = 0;
  logic recording = 0;

  always @(posedge clk) begin
    if (busy) busy_clocks++;
    if (recording) seen.push_back(apc_ctrl);
  end

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send_frame(input logic [3:0] op, input logic [31:0] payload);
    logic [35:0] f;
    f = {op, payload};
    for (int i = 35; i >= 0; i--) bus.w8(BADD + 1, 8'(f[i]));
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1; #1 rst_n = 0;
    tv = 0; fv = 0; tc = 0; fc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // strip multiplexing: VME strip number to detector strip number
    begin
      int vme [12] = '{0, 1, 2, 3, 4, 127, 128, 129, 130, 131, 257, 511};
      int det [12] = '{0, 64, 32, 96, 1, 127, 128, 192, 160, 224, 320, 511};
      foreach (vme[i]) check(int'(vme_to_det_strip(9'(vme[i]))) == det[i],
                             $sformatf("VME strip %0d is detector strip %0d", vme[i], vme_to_det_strip(9'(vme[i]))));
    end

    send_frame(4'd0, 32'd0);
    for (int k = 0; k < NLINES; k++) send_frame(4'd1, line_pattern(k));
    send_frame(4'd3, 32'd240);
    send_frame(4'd4, {16'd256, 16'd20});
    check(cs_running, "Control Board not running");

    bus.w8(BADD, CMD_RESET);
    bus.w8(BADD, CMD_PEDRST);
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < 128; i++) bus.w8(BADD + 24'h20001, ped_value(s, i));

    bus.w8(BADD, CMD_RESET);
    bus.w8(BADD, CMD_STOP);
    bus.w16(BADD, 16'h000A);
    for (int s = 1; s < 4; s++) begin
      bus.w8(BADD + SO[s], CMD_STOP);
      bus.w16(BADD + SO[s], 16'h000A);
    end
    bus.w8(BADD, CMD_ACQ);

    // one trigger to both boards
    busy_clocks = 0;
    @(negedge clk); tv = 1; tc = 1;
    wait (cs_phase == PH_REREAD);
    @(negedge clk); recording = 1;
    tv = 0; tc = 0;
    wait (eob);
    // the control lines lag the step counter by one clock
    repeat (2) @(negedge clk);
    recording = 0;
    repeat (5) @(negedge clk);
    check(!busy, "BUSY not released by EOB");
    check(nread == 1, "no readout");
    check(busy_clocks >= 516 && busy_clocks <= 520, $sformatf("BUSY lasted %0d clocks", busy_clocks));
    check(seen.size() == NLINES, $sformatf("%0d sequence steps", seen.size()));
    foreach (seen[i]) if (i < NLINES && seen[i] != line_pattern(i)) begin
      check(0, $sformatf("step %0d drove %h expected %h", i, seen[i], line_pattern(i)));
      break;
    end
    check(1, "sequence playback");

    for (int s = 0; s < 4; s++) begin
      model[s].push_back({1'b1, 15'd1});
      for (int i = 0; i < 128; i++)
        if (pph_value(0, s, i) >= 8'd10) model[s].push_back({1'b0, 7'(i), pph_value(0, s, i)});
    end

    bus.w8(BADD, CMD_STOP);
    for (int s = 0; s < 4; s++) begin
      bus.r16(BADD + SO[s], q);
      check(q == 16'(model[s].size()), $sformatf("segment %0d words %0d expected %0d", s, q, model[s].size()));
      bus.w16(BADD + SO[s], 16'h080A);
      bus.r16(BADD + SO[s], q);
      check(q == 16'd1, $sformatf("segment %0d triggers %0d", s, q));
    end

    bus.w8(BADD, CMD_RESET);
    for (int s = 0; s < 4; s++)
      foreach (model[s][i]) begin
        bus.r16(BADD + SO[s] + 24'(2 * i), q);
        check(q == model[s][i], $sformatf("segment %0d word %0d = %h expected %h", s, i, q, model[s][i]));
      end
    check(!bus.berr, "bus error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
