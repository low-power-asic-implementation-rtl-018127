// tb_add_round_key: self-checking testbench for add_round_key. It applies
// random states and keys and checks the output against a bit-by-bit XOR
// computed in the testbench.
module tb_add_round_key;
  import aes_ref_pkg::*;
  logic [127:0] din, rk, dout, exp;
  int checks = 0, failures = 0;

  add_round_key dut (.din(din), .round_key(rk), .dout(dout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      din = rand128();
      rk  = (i == 0) ? '1 : rand128();
      #1;
      for (int b = 0; b < 128; b++) exp[b] = (din[b] != rk[b]);
      checks++;
      if (dout !== exp) begin
        failures++;
        $display("FAIL din=%h rk=%h got=%h exp=%h", din, rk, dout, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
