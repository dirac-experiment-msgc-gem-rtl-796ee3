// tb_vme_segment -- one segment with a 64-word memory (so that it can be
// filled quickly). Loads pedestals through the chain input, acquires
// events from a stream of 128 pulse heights (one per two clocks, the
// multiplexed strip rate), and checks against a reference model: header
// and data words in memory, words written, trigger counts with every
// combination of the counting bits 8 and 9, fast clear discarding an event,
// all four status read selections, BUSY from trigger to EOB, memory
// overflow with and without bit 12, and reset.
module tb_vme_segment;
  import msgc_pkg::*;
  logic clk = 0;
  always #25 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int DEPTH = 64;

  logic        rst_n, cmd_wr, thr_wr, rd, ped_wr_in, ped_wr_out;
  logic [7:0]  cmd_val, ped_val, dph;
  thr_status_t thr_val, thr_st;
  logic [14:0] rd_idx;
  logic [15:0] rdata, ntrig;
  logic        trig, fc, eob, dph_valid, busy, overflow;
  seg_mode_e   mode;
  logic [6:0]  nwords;
  logic [7:0]  ped_count, strips_seen;

  vme_segment #(.MEM_DEPTH(DEPTH)) dut (.*);

  logic [7:0]  ped [128];
  logic [15:0] model [$];        // expected memory contents
  int          ref_ntrig = 0;
  int          n_overflow_seen = 0;

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic command(input logic [7:0] v);
    @(negedge clk); cmd_wr = 1; cmd_val = v;
    @(negedge clk); cmd_wr = 0;
  endtask

  task automatic set_thr(input logic e, input rd_sel_e s, input logic b, input logic a, input logic [7:0] t);
    @(negedge clk); thr_wr = 1; thr_val = '{busy_on_full: e, rd_sel: s, no_inc_busy: b, no_inc_fc: a, thr: t};
    @(negedge clk); thr_wr = 0;
  endtask

  task automatic read(input logic [14:0] idx, output logic [15:0] v);
    @(negedge clk); rd = 1; rd_idx = idx;
    @(negedge clk); rd = 0; v = rdata;
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1;
    @(negedge clk); s = 0;
  endtask

  function automatic logic [7:0] adc(input int ev, input int i);
    return 8'((i * 13 + ev * 7) % 90 + 5);
  endfunction

  // full event: trigger, 128 DPHs every second clock, EOB
  task automatic run_event(input int ev, input logic [7:0] t, input int first, input int n);
    logic was_busy;
    was_busy = busy;
    pulse(trig);
    if (!was_busy) begin
      ref_ntrig++;
      if (model.size() < DEPTH) model.push_back({1'b1, 15'(ref_ntrig)});
      check(busy, "BUSY not raised by trigger");
    end
    for (int i = first; i < first + n; i++) begin
      logic [7:0] p;
      @(negedge clk); dph_valid = 1; dph = adc(ev, i);
      p = (dph > ped[i]) ? dph - ped[i] : 8'd0;
      if (!was_busy && p >= t && model.size() < DEPTH) model.push_back({1'b0, 7'(i), p});
      @(negedge clk); dph_valid = 0;
    end
    repeat (3) @(negedge clk);
  endtask

  task automatic status(input rd_sel_e s, input logic [15:0] exp_v, input string what);
    logic [15:0] v;
    set_thr(thr_st.busy_on_full, s, thr_st.no_inc_busy, thr_st.no_inc_fc, thr_st.thr);
    read(15'd0, v);
    check(v == exp_v, $sformatf("%s read %0d expected %0d", what, v, exp_v));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (overflow) n_overflow_seen++;

  initial begin
    logic [15:0] v;
    rst_n = 1; #1 rst_n = 0;
    cmd_wr = 0; thr_wr = 0; rd = 0; ped_wr_in = 0; trig = 0; fc = 0; eob = 0; dph_valid = 0;
    cmd_val = 0; ped_val = 0; dph = 0; rd_idx = 0; thr_val = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 128; i++) ped[i] = 8'($urandom_range(10, 50));

    // pedestal load through the chain input; the 129th byte is passed on
    command(CMD_PEDRST);
    check(mode == MODE_PEDLD, "mode after 85");
    for (int i = 0; i < 129; i++) begin
      @(negedge clk); ped_wr_in = 1; ped_val = (i < 128) ? ped[i] : 8'hEE;
      if (i == 128) check(ped_wr_out, "129th pedestal not passed on");
      else          check(!ped_wr_out, "pedestal passed on too early");
    end
    @(negedge clk); ped_wr_in = 0;
    check(ped_count == 128, "pedestal count");

    // threshold 30, counting bits 0, status = pointer
    command(CMD_STOP);
    set_thr(0, RD_POINTER, 0, 0, 8'd30);
    command(CMD_ACQ);
    check(mode == MODE_ACQ, "mode after 170");

    // event 1, partial readout so the 64-word memory is not yet full
    run_event(1, 8'd30, 0, 20);
    check(strips_seen == 20, "strips seen");
    // trigger while busy: counted (bit 9 = 0)
    pulse(trig); ref_ntrig++;
    pulse(eob);
    @(negedge clk);
    check(!busy, "BUSY not released by EOB");
    check(nwords == 7'(model.size()), $sformatf("words %0d expected %0d", nwords, model.size()));

    // fast clear with bit 8 = 0: event discarded, trigger stays counted
    begin
      int n_before; n_before = model.size();
      pulse(trig); ref_ntrig++;
      repeat (4) @(negedge clk);
      check(nwords == 7'(n_before + 1), "header written ahead of fast clear");
      pulse(fc);
      check(nwords == 7'(n_before), "fast clear did not rewind");
      pulse(eob);
    end
    // bits 8 and 9 set: busy triggers and fast-cleared triggers not counted
    command(CMD_STOP);
    status(RD_NTRIG, 16'(ref_ntrig), "trigger count");
    set_thr(0, RD_POINTER, 1, 1, 8'd30);
    command(CMD_ACQ);
    pulse(trig);
    pulse(trig);        // while busy: not counted
    pulse(fc);          // taken back
    pulse(eob);
    command(CMD_STOP);
    status(RD_NTRIG, 16'(ref_ntrig), "trigger count with bits 8,9 set");
    status(RD_POINTER, 16'(model.size()), "memory pointer");
    status(RD_THRST, 16'h071E, "threshold+status register");   // bit12=0, bits11:10=01, bits9:8=11, thr=0x1E
    status(RD_ZERO, 16'd0, "zero value");

    // memory read in VME mode after reset
    command(CMD_RESET);
    check(mode == MODE_VME && nwords == 0 && ntrig == 0, "reset");
    foreach (model[i]) begin
      read(15'(i), v);
      check(v == model[i], $sformatf("memory word %0d = %h expected %h", i, v, model[i]));
    end

    // overflow without bit 12: words dropped, BUSY released by EOB
    model.delete(); ref_ntrig = 0;
    set_thr(0, RD_POINTER, 0, 0, 8'd0);
    command(CMD_ACQ);
    run_event(2, 8'd0, 0, 128);
    pulse(eob);
    @(negedge clk);
    check(overflow && nwords == 7'(DEPTH), "overflow not flagged");
    check(!busy, "BUSY held on full memory with bit 12 = 0");
    // bit 12 set: BUSY stays high while the memory is full
    command(CMD_STOP);
    set_thr(1, RD_POINTER, 0, 0, 8'd0);
    command(CMD_ACQ);
    pulse(trig); pulse(eob);
    @(negedge clk);
    check(busy, "BUSY not held on full memory with bit 12 = 1");
    command(CMD_RESET);
    check(!busy && !overflow, "reset did not clear overflow BUSY");
    foreach (model[i]) begin
      read(15'(i), v);
      check(v == model[i], $sformatf("overflow memory word %0d = %h expected %h", i, v, model[i]));
    end
    check(n_overflow_seen > 0, "overflow never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
