// tb_segment_occupancy -- full-occupancy load on one segment at full memory
// size (32 K words): threshold 0, so every one of the 128 strips is stored
// and each event takes 1 header + 128 data words = 129 words. 254 events
// (32 766 words) must fit; the 255th fills the memory and overflows, and
// with bit 12 set BUSY stays high after its EOB. DPHs arrive at the front
// end's rate of one per two clocks; every 17th event is checked word by
// word after a reset hands the memory to the bus.
module tb_segment_occupancy;
  import msgc_pkg::*;
  logic clk = 0;
  always #25 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, cmd_wr, thr_wr, rd, ped_wr_in, ped_wr_out;
  logic [7:0]  cmd_val, ped_val, dph;
  thr_status_t thr_val, thr_st;
  logic [14:0] rd_idx;
  logic [15:0] rdata, ntrig, nwords;
  logic        trig, fc, eob, dph_valid, busy, overflow;
  seg_mode_e   mode;
  logic [7:0]  ped_count, strips_seen;

  vme_segment dut (.*);

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [7:0] ped(input int i);
    return 8'(10 + i % 23);
  endfunction
  function automatic logic [7:0] adc(input int ev, input int i);
    return 8'(ped(i) + (ev * 5 + i) % 200);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1; #1 rst_n = 0;
    cmd_wr = 0; thr_wr = 0; rd = 0; ped_wr_in = 0; trig = 0; fc = 0; eob = 0; dph_valid = 0;
    cmd_val = 0; ped_val = 0; dph = 0; rd_idx = 0; thr_val = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); cmd_wr = 1; cmd_val = CMD_PEDRST;
    @(negedge clk); cmd_wr = 0;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); ped_wr_in = 1; ped_val = ped(i);
    end
    @(negedge clk); ped_wr_in = 0;
    thr_wr = 1; thr_val = '{busy_on_full: 1'b1, rd_sel: RD_POINTER, no_inc_busy: 1'b0, no_inc_fc: 1'b0, thr: 8'd0};
    @(negedge clk); thr_wr = 0; cmd_wr = 1; cmd_val = CMD_ACQ;
    @(negedge clk); cmd_wr = 0;

    for (int ev = 0; ev < 255; ev++) begin
      trig = 1; @(negedge clk); trig = 0;
      for (int i = 0; i < 128; i++) begin
        dph_valid = 1; dph = adc(ev, i);
        @(negedge clk); dph_valid = 0;
        @(negedge clk);
      end
      repeat (3) @(negedge clk);
      eob = 1; @(negedge clk); eob = 0;
      @(negedge clk);
      if (ev == 253) begin
        check(nwords == 16'd32766 && !overflow && !busy, $sformatf("after 254 events: %0d words", nwords));
      end
    end
    check(nwords == 16'd32768 && overflow, $sformatf("after 255 events: %0d words, overflow %0b", nwords, overflow));
    check(busy, "BUSY not held on a full memory");
    check(ntrig == 16'd255, "trigger count");

    @(negedge clk); cmd_wr = 1; cmd_val = CMD_RESET;
    @(negedge clk); cmd_wr = 0;
    for (int ev = 0; ev < 254; ev += 17) begin
      for (int w = 0; w < 129; w++) begin
        logic [15:0] e;
        e = (w == 0) ? {1'b1, 15'(ev + 1)} : {1'b0, 7'(w - 1), 8'(adc(ev, w - 1) - ped(w - 1))};
        @(negedge clk); rd = 1; rd_idx = 15'(ev * 129 + w);
        @(negedge clk); rd = 0;
        check(rdata == e, $sformatf("event %0d word %0d = %h expected %h", ev, w, rdata, e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
