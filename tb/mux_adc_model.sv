// mux_adc_model -- behavioural model of the Control Board multiplexer and
// ADCs with the front-end chips behind them, for simulation only. When the
// sequencer enters its readout step, each of the four segment streams
// delivers the 128 digitised pulse heights of its strips, one every SPACING
// clocks (2 clocks = 100 ns: four chips of 400 ns per channel interleaved),
// starting START clocks into readout. Values come from tb_msgc_pkg for
// readout number `nread` (counted from 0).
module mux_adc_model
  import msgc_pkg::*;
  import tb_msgc_pkg::*;
#(
  parameter int START   = 4,
  parameter int SPACING = 2
) (
  input  logic                  clk,
  input  cs_phase_e             phase,
  output logic [N_SEG-1:0]      dph_valid,
  output logic [N_SEG-1:0][7:0] dph,
  output int                    nread
);
  cs_phase_e last = PH_SAMPLE;

  initial begin
    dph_valid = '0;
    dph       = '0;
    nread     = 0;
    forever begin
      @(posedge clk);
      if (phase == PH_READOUT && last != PH_READOUT) begin
        repeat (START) @(posedge clk);
        for (int i = 0; i < STRIPS_PER_SEG; i++) begin
          for (int s = 0; s < N_SEG; s++) begin
            dph[s] <= dph_value(nread, s, i);
          end
          dph_valid <= '1;
          @(posedge clk);
          dph_valid <= '0;
          repeat (SPACING - 1) @(posedge clk);
        end
        nread = nread + 1;
      end
      last = phase;
    end
  end
endmodule
