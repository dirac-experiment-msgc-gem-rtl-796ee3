// vme_slave -- VME A24/D16 slave interface of the board.
//
// Handles the three access types the board uses: W8 (one byte written), W16
// (a word written) and R16 (a word read). The asynchronous strobes AS* and
// DS1*/DS0* are synchronised to the 20 MHz board clock. When a data strobe
// is seen, the address (A23..A1, the byte lane from DS1*/DS0*), the write
// line and the address modifier are sampled; if base_addr_match accepts
// them, one `req_valid` pulse carries the access to the board as a
// bus_req_t (byte offset inside the 256 KB window, data). A write is
// acknowledged at once; a read waits READ_LAT clocks for `rdata`, then
// drives it on the data lines. DTACK* stays low until the master releases
// the data strobes. As on any VME D16 board, the even byte of a W8 travels
// on D15..D8 and the odd byte on D7..D0.
// `led` (the green front-panel LED) stays lit for LED_HOLD clocks after every
// access to the board.
// Following the board: A24 space, the three access types, the LED. This
// design's own: the synchroniser, the fixed read latency and the LED hold
// time (50 ms).
module vme_slave
  import msgc_pkg::*;
#(
  parameter int unsigned READ_LAT = 2,
  parameter int unsigned LED_HOLD = 1_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  // VME bus (active-low strobes)
  input  logic        as_n,
  input  logic [1:0]  ds_n,       // {DS1*, DS0*}
  input  logic        write_n,
  input  logic [5:0]  am,
  input  logic [23:1] addr,
  input  logic [15:0] dat_i,
  output logic [15:0] dat_o,
  output logic        dat_oe,
  output logic        dtack_n,
  input  logic [5:0]  base_pins,
  output logic        led,
  // board side
  output logic        req_valid,
  output bus_req_t    req,
  input  logic [15:0] rdata
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_ACK, S_IGNORE} state_e;
  state_e state;

  logic [1:0] as_sync, ds1_sync, ds0_sync;
  logic       strobe, released, match;
  logic [$clog2(READ_LAT+1)-1:0] wait_cnt;
  logic [$clog2(LED_HOLD+1)-1:0] led_cnt;

  assign strobe   = !as_sync[1] && (!ds1_sync[1] || !ds0_sync[1]);
  assign released = ds1_sync[1] && ds0_sync[1];

  base_addr_match u_match (
    .addr_hi  (addr[23:18]),
    .am       (am),
    .base_pins(base_pins),
    .match    (match)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_sync  <= '1;
      ds1_sync <= '1;
      ds0_sync <= '1;
    end else begin
      as_sync  <= {as_sync[0],  as_n};
      ds1_sync <= {ds1_sync[0], ds_n[1]};
      ds0_sync <= {ds0_sync[0], ds_n[0]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      req_valid <= 1'b0;
      req       <= '0;
      dat_o     <= '0;
      dat_oe    <= 1'b0;
      dtack_n   <= 1'b1;
      wait_cnt  <= '0;
      led_cnt   <= '0;
    end else begin
      req_valid <= 1'b0;
      if (led_cnt != 0) led_cnt <= led_cnt - 1'b1;
      unique case (state)
        S_IDLE: if (strobe) begin
          if (match) begin
            req_valid    <= 1'b1;
            req.wr       <= !write_n;
            // exactly one strobe low: single byte, DS0* alone = odd byte
            req.byte_acc <= ds1_sync[1] ^ ds0_sync[1];
            req.off      <= {addr[17:1], !ds0_sync[1] && ds1_sync[1]};
            req.wdata    <= (!ds0_sync[1] && ds1_sync[1]) ? {8'h00, dat_i[7:0]} :
                            (ds0_sync[1] && !ds1_sync[1]) ? {8'h00, dat_i[15:8]} : dat_i;
            led_cnt      <= ($clog2(LED_HOLD+1))'(LED_HOLD);
            wait_cnt     <= ($clog2(READ_LAT+1))'(READ_LAT);
            state        <= write_n ? S_READ : S_ACK;
          end else begin
            state <= S_IGNORE;
          end
        end
        S_READ: begin
          if (wait_cnt != 0) wait_cnt <= wait_cnt - 1'b1;
          else begin
            dat_o  <= rdata;
            dat_oe <= 1'b1;
            state  <= S_ACK;
          end
        end
        S_ACK: begin
          dtack_n <= 1'b0;
          if (released) begin
            dtack_n <= 1'b1;
            dat_oe  <= 1'b0;
            state   <= S_IDLE;
          end
        end
        S_IGNORE: if (released) state <= S_IDLE;
      endcase
    end
  end

  assign led = (led_cnt != 0);

  // bus rules: one request per cycle, data driven only while answering a
  // read, DTACK* only after a request
  a_req_pulse: assert property (@(posedge clk) disable iff (!rst_n) req_valid |=> !req_valid);
  a_oe_read:   assert property (@(posedge clk) disable iff (!rst_n) dat_oe |-> !req.wr);
  a_dtack:     assert property (@(posedge clk) disable iff (!rst_n) !dtack_n |-> state == S_ACK);

endmodule
