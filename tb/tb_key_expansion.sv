// tb_key_expansion: self-checking testbench for key_expansion.
//
// It drives the one-hot count through a whole run (wait state, rounds
// 1..14) and checks that every round key matches the key schedule of the
// software model in aes_ref_pkg. It uses the published AES-256 test
// keys and random keys, and checks some expanded words from the AES
// standard's key-expansion example directly.
module tb_key_expansion;
  import aes_ref_pkg::*;
  localparam int NR = 14;
  logic clk = 0;
  logic [255:0] key, kin;
  logic [NR+1:0] count;
  logic [127:0] rk;
  int checks = 0, failures = 0;

  key_expansion #(.NR(NR)) dut (.clk(clk), .key(kin), .count(count), .round_key(rk));

  always #5 clk = ~clk;

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs one schedule and returns the round keys in the order they appear.
  task automatic run(input logic [255:0] k, output logic [127:0] seen [NR+1]);
    kin   = 0 ? ref_dec_key(k) : k;
    count = 1;
    #1 seen[0] = rk;
    @(posedge clk); #1;
    kin = rand256();                 // key only needs to be valid at the start edge
    for (int m = 1; m <= NR; m++) begin
      count = (NR+2)'(1) << m;
      #1 seen[m] = rk;
      @(posedge clk); #1;
    end
    count = (NR+2)'(1) << (NR + 1);
    @(posedge clk); #1;
  endtask

  initial begin
    logic [127:0] seen [NR+1];
    w60_t w;
    ref_init();
    @(posedge clk); #1;
    for (int t = 0; t < 40; t++) begin
      case (t)
        0: key = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
        1: key = 256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4;
        default: key = rand256();
      endcase
      run(key, seen);
      for (int m = 0; m <= NR; m++)
        check(seen[m], ref_round_key(key, 0 ? NR - m : m), "round key");
      if (t == 1) begin
        w = ref_expand(key);
        checks++;
        if (w[8] !== 32'h9ba35411 || w[59] !== 32'h706c631e) begin
          failures++;
          $display("FAIL reference model disagrees with the standard's example");
        end
        check(seen[0 ? NR - 2 : 2][127:96], 32'h9ba35411, "w8 of the standard's example");
        check(seen[0 ? 0 : NR][31:0], 32'h706c631e, "w59 of the standard's example");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
