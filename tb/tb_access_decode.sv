// tb_access_decode -- applies every command of the board's command list
// (W8 commands at the base and at each segment base, control-sequence bit,
// pedestal byte, W16 threshold+status per segment, R16 across the window)
// and a few accesses that must be ignored, and checks the decoded strobes.
module tb_access_decode;
  import msgc_pkg::*;
  int checks = 0, failures = 0;

  logic        req_valid;
  bus_req_t    req;
  logic [3:0]  cmd_wr, thr_wr, rd;
  logic [7:0]  cmd_val, ped_val;
  logic        cs_bit_wr, cs_bit, ped_wr;
  thr_status_t thr_val;
  logic [1:0]  rd_seg;
  logic [14:0] rd_idx;

  access_decode dut (.*);

  task automatic apply(input logic wr, input logic b, input logic [17:0] off, input logic [15:0] d,
                       input logic [3:0] e_cmd, input logic e_cs, input logic e_ped,
                       input logic [3:0] e_thr, input logic [3:0] e_rd);
    req_valid = 1; req.wr = wr; req.byte_acc = b; req.off = off; req.wdata = d;
    #1;
    checks++;
    if (cmd_wr !== e_cmd || cs_bit_wr !== e_cs || ped_wr !== e_ped || thr_wr !== e_thr || rd !== e_rd) begin
      failures++;
      $display("FAIL off=%h wr=%b byte=%b: cmd=%b cs=%b ped=%b thr=%b rd=%b", off, wr, b,
               cmd_wr, cs_bit_wr, ped_wr, thr_wr, rd);
    end
    req_valid = 0; #1;
    checks++;
    if (cmd_wr != 0 || cs_bit_wr || ped_wr || thr_wr != 0 || rd != 0) begin
      failures++; $display("FAIL strobes without req_valid");
    end
  endtask

  initial begin
    req_valid = 0; req = '0;
    apply(1, 1, 18'h00000, 16'd255, 4'b1111, 0, 0, 4'b0000, 4'b0000);
    checks++; if (cmd_val != 8'd255) failures++;
    apply(1, 1, 18'h10000, 16'd255, 4'b0010, 0, 0, 4'b0000, 4'b0000);
    apply(1, 1, 18'h20000, 16'd170, 4'b0100, 0, 0, 4'b0000, 4'b0000);
    apply(1, 1, 18'h30000, 16'd85,  4'b1000, 0, 0, 4'b0000, 4'b0000);
    apply(1, 1, 18'h00001, 16'd1,   4'b0000, 1, 0, 4'b0000, 4'b0000);
    checks++; if (cs_bit != 1'b1) failures++;
    apply(1, 1, 18'h20001, 16'h5A,  4'b0000, 0, 1, 4'b0000, 4'b0000);
    checks++; if (ped_val != 8'h5A) failures++;
    for (int s = 0; s < 4; s++) begin
      apply(1, 0, 18'(s * 'h10000), 16'h1ABC, 4'b0000, 0, 0, 4'(1 << s), 4'b0000);
      checks++; if (16'(thr_val) != 16'h1ABC) failures++;
      apply(0, 0, 18'(s * 'h10000 + 2 * 123), 16'h0, 4'b0000, 0, 0, 4'b0000, 4'(1 << s));
      checks++; if (rd_idx != 15'd123 || rd_seg != 2'(s)) failures++;
    end
    apply(0, 0, 18'h3FFFE, 16'h0, 4'b0000, 0, 0, 4'b0000, 4'b1000);
    checks++; if (rd_idx != 15'h7FFF) failures++;
    // ignored accesses
    apply(1, 1, 18'h00002, 16'd7, 4'b0000, 0, 0, 4'b0000, 4'b0000);
    apply(1, 1, 18'h10001, 16'd7, 4'b0000, 0, 0, 4'b0000, 4'b0000);
    apply(1, 0, 18'h00002, 16'd7, 4'b0000, 0, 0, 4'b0000, 4'b0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
