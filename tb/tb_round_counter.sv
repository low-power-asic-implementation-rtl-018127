// tb_round_counter: self-checking testbench for round_counter (NR = 14).
//
// After reset the counter must wait in state 0 while start is low. After a
// start it must visit states 1..15 on consecutive clocks, one hot, and come
// back to 0. A start held high makes it run again at once; a start pulse
// that arrives mid-run is ignored.
module tb_round_counter;
  localparam int NR = 14;
  logic clk = 0, rst = 1, start = 0;
  logic [NR+1:0] count;
  int checks = 0, failures = 0;

  round_counter #(.NR(NR)) dut (.clk(clk), .rst(rst), .start(start), .count(count));

  always #5 clk = ~clk;

  task automatic check(input logic [NR+1:0] exp, input string what);
    checks++;
    if (count !== exp) begin
      failures++;
      $display("FAIL %s: count=%b exp=%b at %0t", what, count, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(1, "after reset");
    repeat (3) @(posedge clk);
    #1 check(1, "waiting");
    start = 1;
    @(posedge clk);
    #1 start = 0;
    for (int k = 1; k <= NR + 1; k++) begin
      check((NR+2)'(1) << k, "step");
      if (k == 5) start = 1;       // ignored while running
      if (k == 6) start = 0;
      @(posedge clk); #1;
    end
    check(1, "back to wait");
    repeat (2) @(posedge clk);
    #1 check(1, "still waiting");
    // back-to-back runs with start held high
    start = 1;
    for (int run = 0; run < 2; run++) begin
      @(posedge clk); #1;
      for (int k = 1; k <= NR + 1; k++) begin
        check((NR+2)'(1) << k, "held start");
        @(posedge clk); #1;
      end
      check(1, "wait between runs");
    end
    start = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
