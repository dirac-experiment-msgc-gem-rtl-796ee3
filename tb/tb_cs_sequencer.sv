// tb_cs_sequencer -- downloads a control sequence bit by bit, then triggers
// the player. Checks: no trigger accepted before running mode; re-read,
// readout and reset last exactly the programmed number of clocks (first
// with the default re-read length of 240 clocks = 12 us, then with a
// DELAY write); EOB is a single pulse at the end of reset; the control
// lines replay the downloaded RAM lines in order; a fast clear during
// re-read jumps to reset, one during readout is ignored; the reset command
// stops running mode.
module tb_cs_sequencer;
  import msgc_pkg::*;
  logic clk = 0;
  always #25 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, dl_wr, dl_bit, trig, fc, eob, running;
  logic [31:0] ctrl;
  cs_phase_e   phase;
  logic [9:0]  line;
  logic [10:0] lines_loaded;
  int          cyc = 0;
  int          n_eob = 0;
  int          ctrl_err = 0;
  logic [9:0]  line_q;

  cs_sequencer dut (.*);

  function automatic logic [31:0] pattern(input int k);
    return 32'hA5000000 ^ 32'(k * 32'h00010203);
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (eob) n_eob++;
    line_q <= line;
    // ctrl follows the line number by one clock
    if (running && lines_loaded > 0 && 11'(line_q) < lines_loaded && ctrl !== pattern(int'(line_q)))
      ctrl_err++;
  end

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(input logic [3:0] op, input logic [31:0] payload);
    logic [35:0] f;
    f = {op, payload};
    for (int i = 35; i >= 0; i--) begin
      @(negedge clk); dl_wr = 1; dl_bit = f[i];
      @(negedge clk); dl_wr = 0;
    end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1;
    @(negedge clk); s = 0;
  endtask

  // trigger and time the phases; fc_at >= 0 gives a fast clear that many
  // clocks after the trigger
  int n_ph [4];
  always @(posedge clk) n_ph[phase] <= n_ph[phase] + 1;

  task automatic run(input int rr, input int ro, input int rs, input int fc_at, input string what);
    int e0, k;
    e0 = n_eob;
    for (int i = 1; i < 4; i++) n_ph[i] = 0;
    @(negedge clk); trig = 1;
    @(negedge clk); trig = 0;
    k = 1;
    while (phase != PH_SAMPLE && k < 5000) begin
      fc = (fc_at >= 0 && k == fc_at);
      @(negedge clk);
      k++;
    end
    fc = 0;
    if (fc_at < 0 || fc_at >= rr) begin
      check(n_ph[PH_REREAD] == rr, $sformatf("%s: re-read took %0d, expected %0d", what, n_ph[PH_REREAD], rr));
      check(n_ph[PH_READOUT] == ro, $sformatf("%s: readout took %0d, expected %0d", what, n_ph[PH_READOUT], ro));
    end else begin
      check(n_ph[PH_REREAD] == fc_at, $sformatf("%s: re-read took %0d after fast clear", what, n_ph[PH_REREAD]));
      check(n_ph[PH_READOUT] == 0, $sformatf("%s: readout ran after fast clear", what));
    end
    check(n_ph[PH_RESET] == rs, $sformatf("%s: reset took %0d, expected %0d", what, n_ph[PH_RESET], rs));
    @(negedge clk);
    check(n_eob == e0 + 1, $sformatf("%s: %0d EOB pulses", what, n_eob - e0));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1; #1 rst_n = 0;
    dl_wr = 0; dl_bit = 0; trig = 0; fc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    send(4'd0, 32'd0);
    for (int k = 0; k < 600; k++) send(4'd1, pattern(k));
    check(lines_loaded == 600, "lines loaded");
    // not running yet: trigger ignored
    pulse(trig);
    repeat (3) @(negedge clk);
    check(phase == PH_SAMPLE && n_eob == 0, "trigger accepted before running mode");
    send(4'd2, 32'h12345678);          // FIFO write: no effect
    send(4'd4, {16'd256, 16'd20});     // running mode, readout 256, reset 20
    check(running, "running mode not entered");
    run(240, 256, 20, -1, "default lengths");
    send(4'd3, 32'd30);                // DELAY write: re-read 30 lines
    send(4'd4, {16'd64, 16'd8});
    run(30, 64, 8, -1, "programmed lengths");
    run(30, 64, 8, 12, "fast clear in re-read");
    run(30, 64, 8, 50, "fast clear in readout");
    check(ctrl_err == 0, $sformatf("%0d clocks with wrong control lines", ctrl_err));
    send(4'd0, 32'd0);
    check(!running && lines_loaded == 0, "reset command");
    pulse(trig);
    repeat (3) @(negedge clk);
    check(phase == PH_SAMPLE, "trigger accepted after reset command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
