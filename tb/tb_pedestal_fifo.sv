// tb_pedestal_fifo -- two pedestal stores chained as on the board. Loads
// 300 bytes through the head of the chain and checks that the first 128
// land in store 0, the next 128 in store 1 and the rest leave the chain;
// reads both stores back in order (one-clock read latency), then empties
// store 0 with load_rst and reloads it.
module tb_pedestal_fifo;
  logic clk = 0;
  always #25 clk = ~clk;
  int checks = 0, failures = 0;

  logic       rst_n, load_rst, wr;
  logic [7:0] wdata;
  logic       w01, w_out, full0, full1;
  logic [7:0] count0, count1;
  logic [6:0] raddr;
  logic [7:0] rdata0, rdata1;
  int         passed_on = 0;

  pedestal_fifo u0 (.clk, .rst_n, .load_rst, .wr_in(wr),  .wdata, .wr_out(w01),
                    .full(full0), .count(count0), .raddr, .rdata(rdata0));
  pedestal_fifo u1 (.clk, .rst_n, .load_rst, .wr_in(w01), .wdata, .wr_out(w_out),
                    .full(full1), .count(count1), .raddr, .rdata(rdata1));

  function automatic logic [7:0] ped(input int i, input int salt);
    return 8'((i * 37 + salt) ^ (i >> 3));
  endfunction

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (w_out) passed_on++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1; #1 rst_n = 0; load_rst = 0; wr = 0; wdata = 0; raddr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk); wr = 1; wdata = ped(i, 5);
    end
    @(negedge clk); wr = 0;
    @(negedge clk);
    check(count0 == 128 && full0, "store 0 not full after 300 bytes");
    check(count1 == 128 && full1, "store 1 not full after 300 bytes");
    check(passed_on == 44, $sformatf("%0d bytes left the chain, expected 44", passed_on));
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); raddr = 7'(i);
      @(posedge clk); #1;
      check(rdata0 == ped(i, 5), $sformatf("store 0 entry %0d", i));
      check(rdata1 == ped(i + 128, 5), $sformatf("store 1 entry %0d", i));
    end
    // second pass over the same entries: the store keeps its pedestals
    for (int i = 0; i < 128; i += 17) begin
      @(negedge clk); raddr = 7'(i);
      @(posedge clk); #1;
      check(rdata0 == ped(i, 5), $sformatf("re-read store 0 entry %0d", i));
    end
    @(negedge clk); load_rst = 1;
    @(negedge clk); load_rst = 0;
    check(count0 == 0 && !full0, "load_rst did not empty store 0");
    for (int i = 0; i < 10; i++) begin
      @(negedge clk); wr = 1; wdata = ped(i, 99);
    end
    @(negedge clk); wr = 0;
    check(count0 == 10, "reload count");
    @(negedge clk); raddr = 7'd9;
    @(posedge clk); #1;
    check(rdata0 == ped(9, 99), "reloaded entry 9");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
