// tb_aes_encrypt: self-checking testbench for aes_encrypt (AES-256, NR = 14).
//
// It checks the published AES-256 known-answer vectors and random blocks and
// keys against the software model in aes_ref_pkg. It also checks the timing:
// ready only while waiting; valid exactly NR clock edges after the
// accepting edge, for one cycle; the result held on data_out afterwards; and
// a new block accepted in the cycle after valid (back-to-back operation with
// enable held high).
module tb_aes_encrypt;
  import aes_ref_pkg::*;
  localparam int NR = 14;
  localparam bit DEC = 0;
  logic clk = 0, rst = 1, enable = 0, ready, valid;
  logic [127:0] din, dout;
  logic [255:0] key;
  int checks = 0, failures = 0;

  aes_encrypt #(.NR(NR)) dut (.clk(clk), .rst(rst), .enable(enable), .data_in(din), .key(key),
                      .ready(ready), .data_out(dout), .valid(valid));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One operation: returns the output and checks the valid timing.
  task automatic op(input logic [255:0] k, input logic [127:0] x, input bit keep_enable,
                    output logic [127:0] y);
    int lat = 0;
    check(ready === 1'b1, "ready while waiting");
    din = x;
    key = DEC ? ref_dec_key(k) : k;
    enable = 1;
    @(posedge clk); #1;
    if (!keep_enable) enable = 0;
    din = rand128();                   // inputs are only sampled on the start edge
    key = rand256();
    while (valid !== 1'b1 && lat < 100) begin
      check(ready === 1'b0, "not ready while busy");
      @(posedge clk); #1;
      lat++;
    end
    check(lat == NR, $sformatf("valid %0d edges after the accepting edge, expected %0d", lat, NR));
    y = dout;
    @(posedge clk); #1;
    check(valid === 1'b0, "valid lasts one cycle");
    check(dout === y, "result held after valid");
  endtask

  function automatic logic [127:0] model(logic [255:0] k, logic [127:0] x);
    return DEC ? ref_decrypt(k, x) : ref_encrypt(k, x);
  endfunction

  initial begin
    logic [255:0] k;
    logic [127:0] pt, ct, y;
    ref_init();
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // Known-answer vectors (AES standard example, NIST SP 800-38A ECB-AES256)
    for (int v = 0; v < 3; v++) begin
      case (v)
        0: begin k = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
                 pt = 128'h00112233445566778899aabbccddeeff; ct = 128'h8ea2b7ca516745bfeafc49904b496089; end
        1: begin k = 256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4;
                 pt = 128'h6bc1bee22e409f96e93d7e117393172a; ct = 128'hf3eed1bdb5d2a03c064b5a7e3db181f8; end
        default: begin k = 256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4;
                 pt = 128'hae2d8a571e03ac9c9eb76fac45af8e51; ct = 128'h591ccb10d410ed26dc5ba74a31362870; end
      endcase
      check(model(k, DEC ? ct : pt) === (DEC ? pt : ct), "reference model known answer");
      op(k, DEC ? ct : pt, 0, y);
      check(y === (DEC ? pt : ct), $sformatf("known answer %0d: got %h", v, y));
      repeat (v) @(posedge clk);
      #1;
    end
    // Random blocks, with and without idle gaps, some back to back.
    for (int i = 0; i < 60; i++) begin
      k  = rand256();
      pt = rand128();
      op(k, pt, (i % 3) != 0, y);
      check(y === model(k, pt), $sformatf("random block %0d: got %h exp %h", i, y, model(k, pt)));
      enable = 0;
      if (i % 2) begin
        repeat ($urandom_range(0, 3)) @(posedge clk);
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
