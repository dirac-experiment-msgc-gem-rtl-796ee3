// tb_vme_board -- the VME board at full size, driven through its VME bus
// with the host command sequences of the board's operating procedure:
// pedestal load (reset, 85, 512 bytes into the daisy chain in multiplexed
// order), threshold+status load per segment, acquisition (170), events,
// board status check in both variants (word counts only, and the
// register / trigger count / word count walk), and memory read (reset,
// then R16 over every written word). Digitised pulse heights and EOB are
// driven by the testbench. Also checks the control-sequence bits forwarded
// to the Control Board, BUSY from trigger to EOB, a trigger arriving while
// BUSY, a fast clear, a status check in the middle of acquisition
// followed by more events, and the access LED.
module tb_vme_board;
  import msgc_pkg::*;
  import tb_msgc_pkg::*;
  logic clk = 0;
  always #25 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [23:0] BADD = 24'hF00000;   // pins 12 and 11 grounded
  localparam logic [23:0] SO [4] = '{24'h00000, 24'h10000, 24'h20000, 24'h30000}; // byte offsets

  logic rst_n, led, tv, fv, busy, eob, dl_wr, dl_bit;
  logic [3:0]       dph_valid;
  logic [3:0][7:0]  dph;
  seg_mode_e [3:0]  seg_mode;
  logic [3:0][15:0] seg_nwords, seg_ntrig;
  logic [3:0]       seg_overflow;
  logic [15:0]      q;

  vme_bus_if bus (clk);

  vme_board #(.LED_HOLD(100)) dut (
    .clk, .rst_n, .as_n(bus.as_n), .ds_n(bus.ds_n), .write_n(bus.write_n), .am(bus.am),
    .addr(bus.addr), .dat_i(bus.dat_m), .dat_o(bus.dat_s), .dat_oe(bus.dat_oe),
    .dtack_n(bus.dtack_n), .base_pins(6'b111100), .led, .tv, .fv, .busy, .eob,
    .dph_valid, .dph, .dl_wr, .dl_bit, .seg_mode, .seg_nwords, .seg_ntrig, .seg_overflow);

  logic [15:0] model [4][$];
  int          ntrig_ref = 0;
  logic        dl_bits [$];

  always @(posedge clk) if (dl_wr) dl_bits.push_back(dl_bit);

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic pulse(ref logic s, input int n);
    @(negedge clk); s = 1;
    repeat (n) @(negedge clk);
    s = 0;
  endtask

  // one event: trigger, four streams of 128 heights, EOB
  task automatic event_run(input int ev, input logic [7:0] thr, input logic with_fc);
    logic was_busy;
    was_busy = busy;
    pulse(tv, 3);
    repeat (4) @(negedge clk);
    if (!was_busy) begin
      ntrig_ref++;
      check(busy, "BUSY did not rise on trigger");
      for (int s = 0; s < 4; s++) model[s].push_back({1'b1, 15'(ntrig_ref)});
    end
    if (with_fc) begin
      pulse(fv, 2);
      repeat (4) @(negedge clk);
      for (int s = 0; s < 4; s++) void'(model[s].pop_back());
    end else begin
      for (int i = 0; i < 128; i++) begin
        @(negedge clk);
        dph_valid = '1;
        for (int s = 0; s < 4; s++) begin
          dph[s] = dph_value(ev, s, i);
          if (!was_busy && pph_value(ev, s, i) >= thr) model[s].push_back({1'b0, 7'(i), pph_value(ev, s, i)});
        end
        @(negedge clk);
        dph_valid = '0;
      end
    end
    repeat (4) @(negedge clk);
    pulse(eob, 1);
    repeat (2) @(negedge clk);
    check(!busy, "BUSY did not fall on EOB");
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1; #1 rst_n = 0;
    tv = 0; fv = 0; eob = 0; dph_valid = '0; dph = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // control-sequence bits go straight through to the Control Board
    for (int i = 0; i < 8; i++) bus.w8(BADD + 1, 8'(i % 3 == 0));
    check(dl_bits.size() == 8, "control-sequence bits forwarded");
    foreach (dl_bits[i]) check(dl_bits[i] == (i % 3 == 0), $sformatf("control bit %0d", i));
    check(led, "LED not lit by accesses");

    // pedestal load: 512 bytes in arrival order, segment 0 first
    bus.w8(BADD, CMD_RESET);
    bus.w8(BADD, CMD_PEDRST);
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < 128; i++) bus.w8(BADD + 24'h20001, ped_value(s, i));

    // threshold+status load: threshold 10, all status bits 0
    bus.w8(BADD, CMD_RESET);
    bus.w8(BADD, CMD_STOP);
    bus.w16(BADD, 16'h000A);
    for (int s = 1; s < 4; s++) begin
      bus.w8(BADD + SO[s], CMD_STOP);
      bus.w16(BADD + SO[s], 16'h000A);
    end

    // acquisition
    bus.w8(BADD, CMD_ACQ);
    foreach (seg_mode[s]) check(seg_mode[s] == MODE_ACQ, "segment not acquiring");
    event_run(0, 8'd10, 0);
    event_run(1, 8'd10, 1);     // fast clear: discarded, still counted
    event_run(2, 8'd10, 0);
    // status check during the acquisition time, then acquisition resumes
    bus.w8(BADD, CMD_STOP);
    for (int s = 0; s < 4; s++) begin
      bus.r16(BADD + SO[s], q);
      check(q == 16'(model[s].size()), $sformatf("mid-run segment %0d words %0d", s, q));
    end
    bus.w8(BADD, CMD_ACQ);
    event_run(3, 8'd10, 0);

    // a trigger that starts an event with no data, then one during its BUSY
    pulse(tv, 3);
    ntrig_ref++;
    for (int s = 0; s < 4; s++) model[s].push_back({1'b1, 15'(ntrig_ref)});
    repeat (4) @(negedge clk);
    pulse(tv, 3);               // arrives while BUSY: counted, no header
    ntrig_ref++;
    repeat (4) @(negedge clk);
    pulse(eob, 1);

    // board status check, first variant: word counts
    bus.w8(BADD, CMD_STOP);
    for (int s = 0; s < 4; s++) begin
      bus.r16(BADD + SO[s], q);
      check(q == 16'(model[s].size()), $sformatf("segment %0d words %0d expected %0d", s, q, model[s].size()));
    end
    // second variant: bits 10,11 = 1,0 first
    for (int s = 0; s < 4; s++) bus.w16(BADD + SO[s], 16'h040A);
    for (int s = 0; s < 4; s++) begin
      bus.r16(BADD + SO[s], q);
      check(q == 16'h040A, $sformatf("segment %0d register %h", s, q));
      bus.w16(BADD + SO[s], 16'h080A);
      bus.r16(BADD + SO[s], q);
      check(q == 16'(ntrig_ref), $sformatf("segment %0d triggers %0d expected %0d", s, q, ntrig_ref));
      bus.w16(BADD + SO[s], 16'h000A);
      bus.r16(BADD + SO[s], q);
      check(q == 16'(model[s].size()), $sformatf("segment %0d words (walk) %0d", s, q));
      bus.w16(BADD + SO[s], 16'h0C0A);
      bus.r16(BADD + SO[s], q);
      check(q == 16'h0000, "zero selection");
      bus.w16(BADD + SO[s], 16'h040A);
    end

    // memory read
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
