// tb_sub_bytes: self-checking testbench for sub_bytes.
//
// It applies fixed and random 128-bit states and compares the output with
// the software model in aes_ref_pkg. Known S-box values from the AES standard are also checked.
module tb_sub_bytes;
  import aes_ref_pkg::*;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  sub_bytes dut (.din(din), .dout(dout));

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: din=%h got=%h exp=%h", what, din, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    din = 128'h00_01_53_ff_10_20_30_40_50_60_70_80_90_a0_b0_c0; #1;
    check(dout[127:96], 32'h63_7c_ed_16, "known S-box");
    for (int a = 0; a < 256; a++) begin din = {16{8'(a)}}; #1; check(dout, {16{ref_sbox(8'(a))}}, "all bytes"); end
    for (int i = 0; i < 500; i++) begin
      din = (i < 16) ? {16{8'(i * 17)}} : rand128();
      #1;
      check(dout, ref_sub_bytes(din, 0), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
