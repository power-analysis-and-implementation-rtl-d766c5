// tb_tff_clock_gate: self-checking test of the T flip-flop clock gate.
//
// A reference model of the T flip-flop (toggle on the falling clock edge
// when en is high) predicts the gated clock. The test checks gclk against
// clk & q_model in both clock phases, that gclk only ever changes at a clock
// edge (no clipped pulses or glitches), and the rates the gate is meant to
// give: every pulse with Q held at 1, every other pulse with en high, none
// with Q held at 0.
`timescale 1ns/1ps
module tb_tff_clock_gate;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic q, gclk;

  int checks = 0;
  int failures = 0;
  logic q_model;
  int gclk_rises = 0;

  tff_clock_gate dut (.clk(clk), .rst_n(rst_n), .en(en), .q(q), .gclk(gclk));

  always #5 clk = ~clk;

  // The gated clock may only change at a clock edge; the clock has an edge
  // every 5 ns.
  always @(gclk) begin
    if (rst_n) begin
      checks++;
      if ($time % 5 != 0) begin
        failures++;
        $display("FAIL: gclk changed at %0t away from a clock edge", $time);
      end
    end
  end

  always @(posedge gclk) gclk_rises++;

  always @(negedge clk or negedge rst_n) begin
    if (!rst_n)  q_model <= 1'b1;
    else if (en) q_model <= ~q_model;
  end

  // Compare in the middle of both clock phases.
  always @(posedge clk or negedge clk) begin
    if (rst_n) begin
      #2;
      checks++;
      if (q !== q_model || gclk !== (clk & q_model)) begin
        failures++;
        $display("FAIL %0t: q=%b gclk=%b expected q=%b gclk=%b", $realtime, q, gclk,
                 q_model, clk & q_model);
      end
    end
  end

  task automatic run_and_count(input logic en_val, input int cycles, input int expected);
    int start;
    @(posedge clk); #2;
    en = en_val;
    start = gclk_rises;
    repeat (cycles) @(posedge clk);
    #1;
    checks++;
    if (gclk_rises - start != expected) begin
      failures++;
      $display("FAIL: en=%b over %0d cycles gave %0d gated pulses, expected %0d",
               en_val, cycles, gclk_rises - start, expected);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    en    = 1'b0;
    #12;
    checks++;
    if (q !== 1'b1) begin failures++; $display("FAIL: q not 1 in reset"); end
    rst_n = 1'b1;
    // Q held at 1: every clock pulse passes (the first counted edge follows
    // the en change, the last counted edge is the final posedge).
    run_and_count(1'b0, 20, 20);
    // EN high: half frequency. q is 1 going in, so the first falling edge
    // turns it to 0.
    run_and_count(1'b1, 20, 10);
    // Stop toggling, then toggle once more if needed to leave q at 0.
    @(posedge clk); #2; en = 1'b0;
    if (q_model) begin
      en = 1'b1;
      @(posedge clk); #2; en = 1'b0;
    end
    checks++;
    if (q_model !== 1'b0) begin failures++; $display("FAIL: setup for stopped clock"); end
    // Q held at 0: the clock is stopped.
    run_and_count(1'b0, 20, 0);
    // Random enable pattern, checked cycle by cycle by the monitors above.
    repeat (300) begin
      @(posedge clk); #2;
      en = 1'($urandom_range(0, 1));
    end
    // Reset in the middle restarts with the clock running.
    @(posedge clk); #1; rst_n = 1'b0; en = 1'b0;
    #3;
    checks++;
    if (q !== 1'b1) begin failures++; $display("FAIL: q not 1 after reset"); end
    @(posedge clk); #2; rst_n = 1'b1;
    run_and_count(1'b0, 10, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
