// tb_mix_columns: self-checking testbench for mix_columns.
//
// It applies fixed and random 128-bit states and compares the output with
// the software model in aes_ref_pkg. Published MixColumns column vectors are also checked.
module tb_mix_columns;
  import aes_ref_pkg::*;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  mix_columns dut (.din(din), .dout(dout));

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
    din = 128'hdb135345_f20a225c_01010101_c6c6c6c6; #1;
    check(dout, 128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6, "known columns");
    din = 128'hd4d4d4d5_2d26314c_00000000_ffffffff; #1;
    check(dout, 128'hd5d5d7d6_4d7ebdf8_00000000_ffffffff, "known columns 2");
    for (int i = 0; i < 500; i++) begin
      din = (i < 16) ? {16{8'(i * 17)}} : rand128();
      #1;
      check(dout, ref_mix_columns(din, 0), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
