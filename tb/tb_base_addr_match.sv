// tb_base_addr_match -- checks the board select against the base-address
// examples (pins grounded -> base) and, exhaustively, against "match when
// A23..A18 equal the pin levels and the AM code is an A24 one".
module tb_base_addr_match;
  int checks = 0, failures = 0;
  logic [23:18] addr_hi;
  logic [5:0]   am, base_pins;
  logic         match;

  base_addr_match dut (.addr_hi, .am, .base_pins, .match);

  // pins 16..11 -> bit 5..0 of base_pins; a grounded pin reads 0
  function automatic logic [5:0] pins(input int g0, input int g1);
    logic [5:0] p = 6'h3F;
    if (g0 != 0) p[g0-11] = 1'b0;
    if (g1 != 0) p[g1-11] = 1'b0;
    return p;
  endfunction

  task automatic expect_base(input logic [5:0] p, input logic [23:0] base);
    base_pins = p; am = 6'h39; addr_hi = base[23:18];
    #1; checks++;
    if (!match) begin failures++; $display("base %h not matched", base); end
    addr_hi = base[23:18] ^ 6'h01;
    #1; checks++;
    if (match) begin failures++; $display("neighbour of %h matched", base); end
  endtask

  initial begin
    expect_base(pins(12, 11), 24'hF00000);
    expect_base(pins(12, 0),  24'hF40000);
    expect_base(pins(11, 0),  24'hF80000);
    expect_base(pins(0, 0),   24'hFC0000);
    expect_base(pins(13, 14), 24'hCC0000);
    expect_base(pins(14, 0),  24'hDC0000);
    expect_base(pins(13, 0),  24'hEC0000);
    for (int p = 0; p < 64; p++)
      for (int a = 0; a < 64; a++)
        for (int m = 0; m < 64; m++) begin
          logic exp_m;
          base_pins = 6'(p); addr_hi = 6'(a); am = 6'(m);
          exp_m = (p == a) && (m == 'h39 || m == 'h3A || m == 'h3D || m == 'h3E);
          #1; checks++;
          if (match !== exp_m) failures++;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
