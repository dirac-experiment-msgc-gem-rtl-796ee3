// cs_sequencer -- the Control Board: stores the front-end control sequence
// and plays it when a trigger arrives.
//
// The sequence is a table of lines, each line one time step (one 20 MHz
// clock) holding the CS_ROWS = 32 control signals of the analog pipeline
// chips. It reaches the board one bit at a time over the download cable
// (`dl_wr`/`dl_bit`, one bit per VME W8). Bits are collected MSB first into
// frames of a 4-bit command code followed by a 32-bit payload:
//   0 reset        stop running mode, next RAM write goes to line 0
//   1 RAM write    payload = the next line of the sequence
//   2 FIFO write   accepted and ignored (its function is not specified)
//   3 DELAY write  payload[15:0] = lines of re-read (trigger delay)
//   4 running mode payload[31:16] = readout lines, [15:0] = reset lines;
//                  triggers are accepted from now on
// Sequence layout: line 0 is the sampling pattern, output while waiting;
// then come the re-read lines, the readout lines and the reset lines. A
// trigger (`trig`) in running mode stops sampling and steps through
// re-read, readout and reset, one line per clock; `eob` pulses for one clock
// on the last reset line and sampling resumes. A fast clear (`fc`) during
// re-read jumps straight to the first reset line; a fast clear later is
// ignored. `phase` tells the digitiser which step is running. `ctrl` is the
// RAM line of the current step, one clock behind `line`.
// Following the board: 32 signals per line, lines as time steps, the five
// command names, the order sampling / re-read / readout / reset, fast clear
// only during re-read, EOB at the end of reset. This design's own: the frame
// format and command codes, the fixed layout of the table, the phase
// lengths held in registers (defaults 240 lines = 12 us of re-read, 256
// lines = 32 channels x 400 ns of readout, 20 lines of reset); a zero length
// counts as one line.
module cs_sequencer
  import msgc_pkg::*;
#(
  parameter int unsigned LINES       = 1024,
  parameter int unsigned REREAD_DEF  = 240,
  parameter int unsigned READOUT_DEF = 256,
  parameter int unsigned RESET_DEF   = 20,
  parameter int unsigned LW          = $clog2(LINES)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                dl_wr,     // one downloaded bit
  input  logic                dl_bit,
  input  logic                trig,      // Tc, one clock
  input  logic                fc,        // Fc, one clock
  output logic [CS_ROWS-1:0]  ctrl,      // control lines to the front end
  output logic                eob,
  output cs_phase_e           phase,
  output logic [LW-1:0]       line,
  output logic                running,
  output logic [LW:0]         lines_loaded
);

  localparam int unsigned FRAME = 4 + CS_ROWS;

  logic [FRAME-2:0]       shreg;
  logic [$clog2(FRAME)-1:0] nbits;
  logic [FRAME-1:0]       frame;
  logic                   frame_done;
  logic [15:0]            reread_len, readout_len, reset_len;
  logic [15:0]            remaining;
  logic [CS_ROWS-1:0]     ram [LINES];

  assign frame      = {shreg, dl_bit};
  assign frame_done = dl_wr && (nbits == ($clog2(FRAME))'(FRAME-1));

  function automatic logic [15:0] eff(input logic [15:0] len);
    return (len == 16'd0) ? 16'd1 : len;
  endfunction

  // download receiver and command decoder
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg        <= '0;
      nbits        <= '0;
      lines_loaded <= '0;
      running      <= 1'b0;
      reread_len   <= 16'(REREAD_DEF);
      readout_len  <= 16'(READOUT_DEF);
      reset_len    <= 16'(RESET_DEF);
    end else if (dl_wr) begin
      shreg <= frame[FRAME-2:0];
      nbits <= frame_done ? '0 : nbits + 1'b1;
      if (frame_done) begin
        unique case (frame[FRAME-1 -: 4])
          4'd0: begin
            running      <= 1'b0;
            lines_loaded <= '0;
          end
          4'd1: if (lines_loaded < (LW+1)'(LINES)) lines_loaded <= lines_loaded + 1'b1;
          4'd3: reread_len <= frame[15:0];
          4'd4: begin
            readout_len <= frame[31:16];
            reset_len   <= frame[15:0];
            running     <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (frame_done && frame[FRAME-1 -: 4] == 4'd1 && lines_loaded < (LW+1)'(LINES))
      ram[lines_loaded[LW-1:0]] <= frame[CS_ROWS-1:0];
    ctrl <= ram[line];
  end

  // player
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= PH_SAMPLE;
      line      <= '0;
      remaining <= '0;
      eob       <= 1'b0;
    end else begin
      eob <= 1'b0;
      unique case (phase)
        PH_SAMPLE: begin
          line <= '0;
          if (trig && running && !(dl_wr && frame_done)) begin
            phase     <= PH_REREAD;
            line      <= LW'(1);
            remaining <= eff(reread_len);
          end
        end
        PH_REREAD: begin
          if (fc) begin
            phase     <= PH_RESET;
            line      <= LW'(1 + 32'(eff(reread_len)) + 32'(eff(readout_len)));
            remaining <= eff(reset_len);
          end else begin
            line <= line + 1'b1;
            if (remaining == 16'd1) begin
              phase     <= PH_READOUT;
              remaining <= eff(readout_len);
            end else remaining <= remaining - 16'd1;
          end
        end
        PH_READOUT: begin
          line <= line + 1'b1;
          if (remaining == 16'd1) begin
            phase     <= PH_RESET;
            remaining <= eff(reset_len);
          end else remaining <= remaining - 16'd1;
        end
        PH_RESET: begin
          if (remaining == 16'd1) begin
            phase <= PH_SAMPLE;
            line  <= '0;
            eob   <= 1'b1;
          end else begin
            line      <= line + 1'b1;
            remaining <= remaining - 16'd1;
          end
        end
      endcase
    end
  end

  // EOB ends the sequence, and a sequence only runs in running mode
  a_eob_end: assert property (@(posedge clk) disable iff (!rst_n) eob |-> phase == PH_SAMPLE);
  a_run:     assert property (@(posedge clk) disable iff (!rst_n)
                              (phase == PH_REREAD && $past(phase) == PH_SAMPLE) |-> $past(running));

endmodule
