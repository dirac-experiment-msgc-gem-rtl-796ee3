// tb_data_memory -- writes pseudo-random words at pseudo-random addresses of
// a full-size segment memory, keeps a reference copy, and reads every
// written address back, checking value and one-clock read latency.
module tb_data_memory;
  logic clk = 0;
  always #25 clk = ~clk;
  int checks = 0, failures = 0;

  logic        we;
  logic [14:0] addr;
  logic [15:0] wdata, rdata;
  logic [15:0] ref_mem [int];

  data_memory dut (.clk, .we, .addr, .wdata, .rdata);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1; addr = 15'($urandom); wdata = 16'($urandom);
      if (i < 4) addr = (i == 0) ? 15'd0 : (i == 1) ? 15'h7FFF : 15'(i);
      ref_mem[int'(addr)] = wdata;
    end
    @(negedge clk); we = 0;
    foreach (ref_mem[a]) begin
      @(negedge clk); addr = 15'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        $display("mismatch at %0h: %h expected %h", a, rdata, ref_mem[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
