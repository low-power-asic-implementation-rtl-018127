// tb_inv_shift_rows: self-checking testbench for inv_shift_rows.
//
// It applies fixed and random 128-bit states and compares the output with
// the software model in aes_ref_pkg. A byte-index pattern checks the exact permutation.
module tb_inv_shift_rows;
  import aes_ref_pkg::*;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  inv_shift_rows dut (.din(din), .dout(dout));

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
    din = 128'h00050a0f04090e03080d02070c01060b; #1;
    check(dout, 128'h000102030405060708090a0b0c0d0e0f, "index pattern");
    for (int i = 0; i < 500; i++) begin
      din = (i < 16) ? {16{8'(i * 17)}} : rand128();
      #1;
      check(dout, ref_shift_rows(din, 1), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
