// tb_clock_gate: self-checking testbench for clock_gate.
//
// en is changed at random points within each clock period, in both phases.
// Each rising edge of clk must reach gclk exactly when en was 1 just before
// that edge. A change of en while clk is high must not change gclk, and gclk
// must be low whenever clk is low.
module tb_clock_gate;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0, gclk_edges = 0, exp_edges = 0;
  logic en_at_edge;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge gclk) gclk_edges++;

  initial begin : watchdog
    #200000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cyc = 0; cyc < 400; cyc++) begin
      // low phase: 10 time units, en may change at time 1..8
      #($urandom_range(1, 8));
      en = (cyc < 20) ? cyc[1] : 1'($urandom);
      #1;
      check(gclk === 1'b0, "gclk low while clk low");
      #1;
      en_at_edge = en;
      while ($time % 10 != 0) #1;
      clk = 1;
      if (en_at_edge) exp_edges++;
      #1 check(gclk === en_at_edge, "edge passes only when enabled");
      // high phase: en changes, gclk must hold
      #3 en = ~en;
      #1 check(gclk === en_at_edge, "gclk held through high phase");
      while ($time % 10 != 5) #1;
      clk = 0;
      #1 check(gclk === 1'b0, "gclk falls with clk");
      while ($time % 10 != 0) #1;
    end
    checks++;
    if (gclk_edges != exp_edges || exp_edges == 0) begin
      failures++;
      $display("FAIL gclk edges %0d expected %0d", gclk_edges, exp_edges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
