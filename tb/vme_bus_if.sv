// vme_bus_if -- testbench VME master for A24/D16 boards. Holds the bus
// signals and the tasks w8 (one byte), w16 and r16 that run one complete
// handshake: address and AM set up, AS* low, data strobes low, wait for
// DTACK*, strobes released, wait for DTACK* to rise. A cycle nobody
// acknowledges within 64 clocks ends with `berr` set (a bus error).
interface vme_bus_if (input logic clk);
  logic        as_n = 1'b1;
  logic [1:0]  ds_n = 2'b11;
  logic        write_n = 1'b1;
  logic [5:0]  am = 6'h39;
  logic [23:1] addr = '0;
  logic [15:0] dat_m = '0;    // master to slave
  logic [15:0] dat_s;         // slave to master
  logic        dat_oe;
  logic        dtack_n;
  logic        berr = 1'b0;
  int unsigned cycles = 0;    // clocks of the last handshake

  task automatic run(input logic [23:0] a, input logic wr, input logic [1:0] ds,
                     input logic [15:0] d, output logic [15:0] q);
    int n;
    @(posedge clk);
    addr    <= a[23:1];
    write_n <= !wr;
    dat_m   <= d;
    as_n    <= 1'b0;
    @(posedge clk);
    ds_n    <= ds;
    n = 0;
    berr = 1'b0;
    while (dtack_n && n < 64) begin
      @(posedge clk);
      n++;
    end
    cycles = n;
    if (dtack_n) berr = 1'b1;
    q = dat_s;
    ds_n <= 2'b11;
    as_n <= 1'b1;
    n = 0;
    while (!dtack_n && n < 64) begin
      @(posedge clk);
      n++;
    end
  endtask

  task automatic w8(input logic [23:0] a, input logic [7:0] v);
    logic [15:0] q;
    // even byte on D15..D8 with DS1*, odd byte on D7..D0 with DS0*
    if (a[0]) run(a, 1'b1, 2'b10, {8'h00, v}, q);
    else      run(a, 1'b1, 2'b01, {v, 8'h00}, q);
  endtask

  task automatic w16(input logic [23:0] a, input logic [15:0] v);
    logic [15:0] q;
    run(a, 1'b1, 2'b00, v, q);
  endtask

  task automatic r16(input logic [23:0] a, output logic [15:0] v);
    run(a, 1'b0, 2'b00, 16'h0000, v);
  endtask
endinterface
