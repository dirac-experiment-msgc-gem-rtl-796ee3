// tb_zs_datapath -- feeds events of 128 pulse heights into the datapath,
// with a behavioural pedestal store answering its read address one clock
// later. Checks every produced word against PPH = max(DPH - ped, 0) >= thr,
// the strip numbering, the two-clock latency, one DPH per clock as well as
// one per two clocks (the 100 ns strip period of the multiplexed cable),
// the restart of the strip counter on `start` and that DPHs beyond 128 or
// outside an event are ignored.
module tb_zs_datapath;
  logic clk = 0;
  always #25 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, start, enable, dph_valid;
  logic [7:0]  dph, thr, ped_rdata;
  logic [6:0]  ped_raddr;
  logic        word_valid;
  logic [15:0] word;
  logic [7:0]  strips_seen;
  logic [7:0]  ped_mem [128];
  logic [15:0] expq [$];
  int          cyc = 0, sent_cyc [$];

  zs_datapath dut (.clk, .rst_n, .start, .enable, .dph_valid, .dph, .thr,
                   .ped_raddr, .ped_rdata, .word_valid, .word, .strips_seen);

  always @(posedge clk) begin
    ped_rdata <= ped_mem[ped_raddr];
    cyc <= cyc + 1;
  end

  always @(posedge clk) if (word_valid) begin
    checks++;
    if (expq.size() == 0) begin
      failures++; $display("unexpected word %h", word);
    end else begin
      logic [15:0] e;
      int c0;
      e  = expq.pop_front();
      c0 = sent_cyc.pop_front();
      if (word !== e) begin failures++; $display("word %h expected %h", word, e); end
      checks++;
      if (cyc - c0 != 2) begin failures++; $display("latency %0d", cyc - c0); end
    end
  end

  task automatic event_run(input int spacing, input int n, input logic [7:0] t, input int seed);
    thr = t;
    @(negedge clk); start = 1; enable = 1;
    @(negedge clk); start = 0;
    for (int i = 0; i < n; i++) begin
      logic [7:0] d;
      d = 8'($urandom_range(0, 255));
      if (i % 7 == 0) d = ped_mem[i % 128];          // exactly at pedestal
      if (i % 11 == 0 && i < 128) d = 8'(ped_mem[i] + t);  // exactly at threshold
      dph_valid = 1; dph = d;
      if (i < 128) begin
        logic [7:0] p;
        p = (d > ped_mem[i]) ? d - ped_mem[i] : 8'd0;
        if (p >= t) begin
          expq.push_back({1'b0, 7'(i), p});
          sent_cyc.push_back(cyc);
        end
      end
      @(negedge clk);
      dph_valid = 0;
      repeat (spacing - 1) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d words missing", expq.size()); end
    expq.delete(); sent_cyc.delete();
    checks++;
    if (strips_seen != 8'(n > 128 ? 128 : n)) begin failures++; $display("strips_seen %0d", strips_seen); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) ped_mem[i] = 8'($urandom_range(10, 60));
    rst_n = 1; #1 rst_n = 0; start = 0; enable = 0; dph_valid = 0; dph = 0; thr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    event_run(1, 128, 8'd20, 1);
    event_run(2, 128, 8'd0, 2);
    event_run(2, 140, 8'd100, 3);   // 12 extra DPHs must be ignored
    event_run(1, 50, 8'd255, 4);    // partial event, high threshold
    // disabled: nothing is produced
    @(negedge clk); enable = 0;
    for (int i = 0; i < 20; i++) begin dph_valid = 1; dph = 8'hFF; @(negedge clk); end
    dph_valid = 0;
    repeat (4) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
