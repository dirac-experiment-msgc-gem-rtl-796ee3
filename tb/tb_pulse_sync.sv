// tb_pulse_sync -- trigger-width test of the input synchroniser: pulses of
// exactly 50 ns (one clock period, the shortest the inputs guarantee) and
// of 60-300 ns, at random phases against the 20 MHz clock, must each give
// exactly one internal pulse of one clock, within three clocks.
module tb_pulse_sync;
  logic clk = 0;
  always #25 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, in, pulse;
  int   n_out = 0;

  pulse_sync dut (.clk, .rst_n, .in, .pulse);

  always @(posedge clk) if (pulse) n_out++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1; in = 0;
    #1 rst_n = 0;
    #100 rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      int w, n0;
      w = (k % 2 == 0) ? 50 : 60 + 10 * ($urandom % 25);
      #($urandom_range(1, 49));
      n0 = n_out;
      in = 1; #(w); in = 0;
      #200;
      checks++;
      if (n_out != n0 + 1) begin
        failures++;
        $display("pulse of %0d ns gave %0d internal pulses", w, n_out - n0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
