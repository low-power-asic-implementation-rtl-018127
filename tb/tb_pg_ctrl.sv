// tb_pg_ctrl: self-checking testbench for pg_ctrl (WAKE_CYCLES = 2).
//
// Scenarios: no sleep while pg_en is low; sleep one clock after the
// encryption block is idle with no request while decryption runs; no sleep
// while a request is pending; wake on a request, and wake when decryption
// ends, each with clk_en returning exactly WAKE_CYCLES+1 clocks after the
// wake condition; and sleep and clk_en never both high.
module tb_pg_ctrl;
  localparam int WAKE = 2;
  logic clk = 0, rst = 1, pg_en = 0, enc_idle = 1, enc_req = 0, dec_busy = 0;
  logic sleep, clk_en;
  int checks = 0, failures = 0;

  pg_ctrl #(.WAKE_CYCLES(WAKE)) dut (.clk(clk), .rst(rst), .pg_en(pg_en), .enc_idle(enc_idle),
    .enc_req(enc_req), .dec_busy(dec_busy), .sleep(sleep), .clk_en(clk_en));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (sleep=%b clk_en=%b)", what, $time, sleep, clk_en);
    end
  endtask

  task automatic tick(input int n = 1);
    repeat (n) begin
      @(posedge clk); #1;
      check(!(sleep && clk_en), "sleep and clock never together");
    end
  endtask

  // Returns the number of clocks until clk_en is high again.
  task automatic wake_time(output int n);
    n = 0;
    while (!clk_en && n < 20) begin tick(); n++; end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    tick(2);
    rst = 0;
    tick();
    check(clk_en && !sleep, "active after reset");
    // pg_en low: never sleeps
    dec_busy = 1;
    tick(5);
    check(clk_en && !sleep, "no sleep with pg_en low");
    // pg_en high: sleeps
    pg_en = 1;
    tick();
    check(sleep && !clk_en, "sleep while decrypting");
    // wake on request
    enc_req = 1;
    tick();
    check(!sleep && !clk_en, "waking: supply on, clock still off");
    wake_time(n);
    check(n == WAKE, $sformatf("clock back %0d clocks after wake, expected %0d", n + 1, WAKE + 1));
    // pending request or busy encryption keeps it awake
    tick(3);
    check(clk_en, "no sleep with a pending request");
    enc_req = 0;
    enc_idle = 0;
    tick(3);
    check(clk_en, "no sleep while encryption busy");
    enc_idle = 1;
    tick();
    check(sleep, "sleep again");
    tick(4);
    check(sleep, "stays asleep");
    // wake when decryption ends
    dec_busy = 0;
    tick();
    check(!sleep && !clk_en, "waking at end of decryption");
    wake_time(n);
    check(n == WAKE, "wake delay at end of decryption");
    tick(3);
    check(clk_en && !sleep, "active with decryption idle");
    // clearing pg_en wakes it
    dec_busy = 1;
    tick(2);
    check(sleep, "asleep before pg_en cleared");
    pg_en = 0;
    wake_time(n);
    check(n == WAKE + 1, "wake after pg_en cleared");
    // asynchronous reset returns to active
    pg_en = 1;
    tick(2);
    check(sleep, "asleep before reset");
    #2 rst = 1;
    #1 check(clk_en && !sleep, "reset wakes it");
    rst = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
