// vme_segment -- one of the four independent segments of the VME board (one
// FPGA each): 128 strips, a pedestal store, a 32 Kword data memory and the
// segment's registers.
//
// Mode register, set by the W8 command bytes:
//   0   reset: memory pointer, trigger counter and BUSY cleared; the memory
//       is handed to the VME bus (R16 reads memory word rd_idx)
//   85  pedestal store emptied, ready for a new daisy-chain load
//   170 acquisition: the memory is handed to the data coming from the
//       Control Board
//   255 acquisition stopped; R16 returns the word chosen by bits 11:10 of the
//       threshold+status register (pointer, register, trigger count or 0)
// In acquisition, a trigger (`trig`) that finds BUSY low starts an event:
// the trigger counter is incremented, BUSY rises, the header word
// {1, event number} is written and the strip counter of zs_datapath is
// cleared; the data words it produces are appended. `eob` (end of busy,
// sent by the Control Board after the front-end reset) lowers BUSY. A
// trigger that finds BUSY high is counted unless bit 9 is set. A fast clear
// (`fc`) during an event discards it: the memory pointer returns to where
// the header was written, and with bit 8 set the trigger is not counted.
// When the memory is full further words are dropped and `overflow` is set;
// with bit 12 set BUSY also stays high while the memory is full.
// Timing: a command or register write acts on the next clock; `rdata` is
// valid one clock after `rd`; the header is written one clock after `trig`;
// a data word two clocks after its DPH.
// Following the board: the commands, the register bits, the word layout,
// counting rules and BUSY behaviour. This design's own: the event number is
// the trigger count after the increment (low 15 bits); a fast clear
// rewinds the pointer; reset leaves the threshold and pedestals alone. The
// pedestal store's full flag is only used inside its daisy chain.
module vme_segment
  import msgc_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 32768,
  parameter int unsigned STRIPS    = 128,
  parameter int unsigned AW        = $clog2(MEM_DEPTH),
  parameter int unsigned SW        = $clog2(STRIPS)
) (
  input  logic        clk,
  input  logic        rst_n,
  // VME side
  input  logic        cmd_wr,
  input  logic [7:0]  cmd_val,
  input  logic        thr_wr,
  input  thr_status_t thr_val,
  input  logic        rd,
  input  logic [14:0] rd_idx,
  output logic [15:0] rdata,
  // pedestal daisy chain
  input  logic        ped_wr_in,
  input  logic [7:0]  ped_val,
  output logic        ped_wr_out,
  // triggers and data from the Control Board
  input  logic        trig,
  input  logic        fc,
  input  logic        eob,
  input  logic        dph_valid,
  input  logic [7:0]  dph,
  // status
  output logic        busy,
  output seg_mode_e   mode,
  output logic [AW:0] nwords,
  output logic [15:0] ntrig,
  output logic        overflow,
  output thr_status_t thr_st,
  output logic [SW:0] ped_count,
  output logic [SW:0] strips_seen
);

  logic          in_event, busy_evt, full;
  logic [AW:0]   ev_start;
  logic          dp_valid;
  logic [15:0]   dp_word;
  logic [SW-1:0] ped_raddr;
  logic [7:0]    ped_rdata;
  logic          acq, start_evt, hdr_we, dat_we, mem_we;
  logic [15:0]   mem_wdata, mem_rdata, stat_q;
  logic          rd_mem_q;

  assign acq       = (mode == MODE_ACQ) && !cmd_wr;
  assign full      = (nwords == (AW+1)'(MEM_DEPTH));
  assign start_evt = acq && trig && !busy_evt && !eob;
  assign hdr_we    = start_evt && !full;
  assign dat_we    = acq && in_event && !fc && dp_valid && !full;
  assign mem_we    = hdr_we || dat_we;
  assign mem_wdata = hdr_we ? header_word(15'(ntrig + 16'd1)) : dp_word;
  assign busy      = busy_evt || (thr_st.busy_on_full && full);

  pedestal_fifo #(.DEPTH(STRIPS)) u_ped (
    .clk     (clk),
    .rst_n   (rst_n),
    .load_rst(cmd_wr && cmd_val == CMD_PEDRST),
    .wr_in   (ped_wr_in),
    .wdata   (ped_val),
    .wr_out  (ped_wr_out),
    .full    (),
    .count   (ped_count),
    .raddr   (ped_raddr),
    .rdata   (ped_rdata)
  );

  zs_datapath #(.STRIPS(STRIPS)) u_dp (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start_evt),
    .enable     (acq && in_event),
    .dph_valid  (dph_valid),
    .dph        (dph),
    .thr        (thr_st.thr),
    .ped_raddr  (ped_raddr),
    .ped_rdata  (ped_rdata),
    .word_valid (dp_valid),
    .word       (dp_word),
    .strips_seen(strips_seen)
  );

  data_memory #(.DEPTH(MEM_DEPTH)) u_mem (
    .clk  (clk),
    .we   (mem_we),
    .addr (mem_we ? nwords[AW-1:0] : rd_idx[AW-1:0]),
    .wdata(mem_wdata),
    .rdata(mem_rdata)
  );

  // control registers and counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode     <= MODE_VME;
      thr_st   <= '0;
      nwords   <= '0;
      ntrig    <= '0;
      ev_start <= '0;
      busy_evt <= 1'b0;
      in_event <= 1'b0;
      overflow <= 1'b0;
    end else begin
      if (thr_wr) thr_st <= thr_val;
      if (cmd_wr) begin
        unique case (cmd_val)
          CMD_RESET: begin
            mode     <= MODE_VME;
            nwords   <= '0;
            ntrig    <= '0;
            ev_start <= '0;
            busy_evt <= 1'b0;
            in_event <= 1'b0;
            overflow <= 1'b0;
          end
          CMD_PEDRST: mode <= MODE_PEDLD;
          CMD_ACQ:    mode <= MODE_ACQ;
          CMD_STOP: begin
            mode     <= MODE_STATUS;
            busy_evt <= 1'b0;
            in_event <= 1'b0;
          end
          default: ;
        endcase
      end else if (acq) begin
        if (eob) begin
          busy_evt <= 1'b0;
          in_event <= 1'b0;
        end
        // trigger counter
        if (start_evt)
          ntrig <= ntrig + 16'd1;
        else if (trig && (busy_evt || eob) && !thr_st.no_inc_busy)
          ntrig <= ntrig + 16'd1;
        else if (fc && in_event && thr_st.no_inc_fc)
          ntrig <= ntrig - 16'd1;
        // event state and memory pointer
        if (start_evt) begin
          busy_evt <= 1'b1;
          in_event <= 1'b1;
          ev_start <= nwords;
        end else if (fc && in_event) begin
          in_event <= 1'b0;
        end
        if (fc && in_event)  nwords <= ev_start;
        else if (mem_we)     nwords <= nwords + 1'b1;
        if ((start_evt || (in_event && dp_valid)) && full) overflow <= 1'b1;
      end
    end
  end

  // read port: memory in VME mode, status word otherwise
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stat_q   <= '0;
      rd_mem_q <= 1'b0;
    end else if (rd) begin
      rd_mem_q <= (mode == MODE_VME);
      unique case (thr_st.rd_sel)
        RD_POINTER: stat_q <= 16'(nwords);
        RD_THRST:   stat_q <= 16'(thr_st);
        RD_NTRIG:   stat_q <= ntrig;
        RD_ZERO:    stat_q <= 16'd0;
      endcase
    end
  end

  assign rdata = rd_mem_q ? mem_rdata : stat_q;

  // the acquisition owns the memory only in acquisition mode, and the
  // pointer never passes the end of the memory
  a_we_acq:  assert property (@(posedge clk) disable iff (!rst_n) mem_we |-> mode == MODE_ACQ);
  a_ptr_max: assert property (@(posedge clk) disable iff (!rst_n) nwords <= (AW+1)'(MEM_DEPTH));

endmodule
