// tb_vme_slave -- runs W8 (even and odd byte), W16 and R16 handshakes
// through the slave with the VME master of vme_bus_if. Checks the decoded
// request (type, byte offset, data lane), one request per cycle, DTACK and
// read data (a responder returns a function of the address two clocks
// after the request), no answer outside the board window or with a non-A24
// address modifier, and the access LED with its hold time.
module tb_vme_slave;
  import msgc_pkg::*;
  logic clk = 0;
  always #25 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n;
  logic        led, req_valid;
  bus_req_t    req, last_req;
  logic [15:0] rdata;
  int          nreq = 0;
  logic [15:0] q;

  vme_bus_if bus (clk);

  vme_slave #(.LED_HOLD(40)) dut (
    .clk, .rst_n, .as_n(bus.as_n), .ds_n(bus.ds_n), .write_n(bus.write_n), .am(bus.am),
    .addr(bus.addr), .dat_i(bus.dat_m), .dat_o(bus.dat_s), .dat_oe(bus.dat_oe),
    .dtack_n(bus.dtack_n), .base_pins(6'b111101), .led, .req_valid, .req, .rdata);

  // responder: R16 data = function of the offset, two clocks after the request
  logic [15:0] r1;
  always @(posedge clk) begin
    if (req_valid) begin nreq++; last_req <= req; end
    r1    <= req_valid ? (16'(req.off) ^ 16'hA5C3) : r1;
    rdata <= r1;
  end

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam logic [23:0] BASE = 24'hF40000;   // pin 12 grounded

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1; #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check(!led, "LED lit before any access");

    bus.w8(BASE + 24'h0, 8'd170);
    check(!bus.berr && nreq == 1, $sformatf("W8 even not acknowledged once (berr=%0d nreq=%0d)", bus.berr, nreq));
    check(last_req.wr && last_req.byte_acc && last_req.off == 18'h0 && last_req.wdata[7:0] == 8'd170,
          "W8 even decoded wrong");
    check(led, "LED not lit after access");

    bus.w8(BASE + 24'h20001, 8'h3C);
    check(nreq == 2 && last_req.off == 18'h20001 && last_req.byte_acc && last_req.wdata[7:0] == 8'h3C,
          "W8 odd decoded wrong");

    bus.w16(BASE + 24'h10000, 16'h1F55);
    check(nreq == 3 && !last_req.byte_acc && last_req.wr && last_req.off == 18'h10000 &&
          last_req.wdata == 16'h1F55, "W16 decoded wrong");

    for (int i = 0; i < 8; i++) begin
      logic [17:0] off;
      off = {2'(i), 15'($urandom), 1'b0};
      bus.r16(BASE + 24'(off), q);
      check(!bus.berr && !last_req.wr && last_req.off == off, "R16 request wrong");
      check(q == (16'(off) ^ 16'hA5C3), $sformatf("R16 data %h", q));
    end

    bus.w8(24'hFC0000, 8'd1);
    check(bus.berr && nreq == 11, "other board's window answered");
    bus.am = 6'h29;   // A16 short I/O
    bus.w8(BASE, 8'd1);
    check(bus.berr && nreq == 11, "non-A24 access answered");
    bus.am = 6'h3D;
    bus.w8(BASE, 8'd1);
    check(!bus.berr && nreq == 12, "supervisory A24 data access not answered");

    repeat (60) @(posedge clk);
    check(!led, "LED still lit after the hold time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
