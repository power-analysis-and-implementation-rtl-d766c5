// tb_gated_alu: end-to-end test of the clock-gated ALU at its default size.
//
// The testbench runs the system clock, drives EN, the opcode and the
// operands, and keeps its own model: a T flip-flop that toggles on each
// falling clock edge with EN high, and an instruction model that, on every
// rising clock edge that the modelled flip-flop lets through, computes the
// expected result and carry from the instruction table below. The outputs
// are compared every cycle, so a held output while the clock is stopped is
// checked as well as each new result.
//
// It first replays the sequence of the published simulation (EN high, giving
// a half-frequency gated clock, then EN low, which freezes the gate), then
// runs a long random mix of EN patterns and instructions. It counts how
// often each mechanism happened and fails if one never did: half-frequency
// gated edges, full-rate gated edges with Q held high, stopped-clock cycles
// whose changed inputs must not reach the output, each of the eleven
// instructions, an arithmetic carry/borrow and a code outside the eleven.
`timescale 1ns/1ps
module tb_gated_alu;
  import alu_pkg::*;

  localparam int unsigned W = 8;
  localparam int unsigned RANDOM_CYCLES = 6000;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic [3:0] opcode;
  logic [W-1:0] a, b, result;
  logic carry, gate_q, gclk;

  int checks = 0;
  int failures = 0;

  logic q_model;
  logic [W-1:0] exp_result;
  logic exp_carry;
  int gated_edges = 0;
  int gclk_rises = 0;

  // Mechanism counters.
  int n_half_rate = 0;    // gated edges while EN high
  int n_full_rate = 0;    // gated edges while EN low and Q held at 1
  int n_stopped = 0;      // cycles with the clock stopped and inputs changed
  int n_carry = 0;        // arithmetic instructions that set carry/borrow
  int n_invalid = 0;      // codes 11..15 executed
  int n_instr [NUM_INSTR];

  gated_alu dut (
    .clk(clk), .rst_n(rst_n), .en(en), .opcode(opcode), .a(a), .b(b),
    .result(result), .carry(carry), .gate_q(gate_q), .gclk(gclk)
  );

  always #5 clk = ~clk;

  always @(posedge gclk) if (rst_n) gclk_rises++;

  always @(negedge clk or negedge rst_n) begin
    if (!rst_n)  q_model <= 1'b1;
    else if (en) q_model <= ~q_model;
  end

  // Instruction model, written as integer arithmetic and bitwise operators.
  task automatic model(input logic [3:0] op, input logic [W-1:0] av, input logic [W-1:0] bv,
                       output logic [W-1:0] r, output logic c);
    int s;
    c = 1'b0;
    case (op)
      4'd0:  begin s = int'(av) + int'(bv); r = W'(s); c = s > 255; end
      4'd1:  begin s = int'(av) - int'(bv); r = W'(s); c = s < 0;   end
      4'd2:  begin s = int'(av) + 1;        r = W'(s); c = s > 255; end
      4'd3:  begin s = int'(av) - 1;        r = W'(s); c = s < 0;   end
      4'd4:  r = av & bv;
      4'd5:  r = av | bv;
      4'd6:  r = av ^ bv;
      4'd7:  r = ~(av & bv);
      4'd8:  r = ~(av | bv);
      4'd9:  r = ~(av ^ bv);
      4'd10: r = ~av;
      default: r = '0;
    endcase
  endtask

  logic [3:0]   last_op;
  logic [W-1:0] last_a, last_b;

  always @(posedge clk) begin
    if (rst_n) begin
      if (q_model) begin
        gated_edges++;
        if (en) n_half_rate++; else n_full_rate++;
        model(opcode, a, b, exp_result, exp_carry);
        if (opcode < 4'(NUM_INSTR)) n_instr[int'(opcode)]++; else n_invalid++;
        if (exp_carry) n_carry++;
        last_op = opcode; last_a = a; last_b = b;
      end else if (opcode != last_op || a != last_a || b != last_b) begin
        n_stopped++;
      end
      #1;
      checks++;
      if (result !== exp_result || carry !== exp_carry || gate_q !== q_model) begin
        failures++;
        $display("FAIL %0t: op=%0d a=%h b=%h -> result=%h carry=%b q=%b, expected %h %b %b",
                 $time, opcode, a, b, result, carry, gate_q, exp_result, exp_carry, q_model);
      end
    end
  end

  initial begin
    repeat (RANDOM_CYCLES + 500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input logic e, input logic [3:0] op, input logic [W-1:0] av,
                       input logic [W-1:0] bv);
    @(posedge clk); #2;
    en = e; opcode = op; a = av; b = bv;
  endtask

  task automatic expect_edges(input int since, input int n, input string what);
    checks++;
    if (gated_edges - since != n) begin
      failures++;
      $display("FAIL: %s: %0d gated edges, expected %0d", what, gated_edges - since, n);
    end
  endtask

  task automatic expect_counter(input int value, input string what);
    checks++;
    if (value == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    int start;
    logic [W-1:0] held;
    rst_n = 1'b0; en = 1'b0; opcode = 4'd0; a = '0; b = '0;
    exp_result = '0; exp_carry = 1'b0;
    last_op = '0; last_a = '0; last_b = '0;
    foreach (n_instr[i]) n_instr[i] = 0;
    #12;
    rst_n = 1'b1;

    // Published simulation: EN high gives a half-frequency gated clock.
    drive(1'b1, 4'd0, 8'd100, 8'd27);
    start = gated_edges;
    for (int i = 0; i < 10; i++) drive(1'b1, 4'(i % 11), W'($urandom), W'($urandom));
    expect_edges(start, 5, "EN high for 10 cycles");
    // EN low with the gate left closed: the output holds whatever the inputs do.
    drive(1'b0, 4'd5, 8'hF0, 8'h0F);
    if (q_model) begin
      drive(1'b1, 4'd4, 8'h0F, 8'h3C);
      drive(1'b0, 4'd5, 8'hF0, 8'h0F);
    end
    @(posedge clk); #1;
    held = result;
    start = gated_edges;
    for (int i = 0; i < 10; i++) drive(1'b0, 4'(i % 11), W'($urandom), W'($urandom));
    @(posedge clk); #1;
    expect_edges(start, 0, "EN low, Q low");
    checks++;
    if (result !== held) begin failures++; $display("FAIL: output changed with clock stopped"); end
    // Open the gate again and leave it open: every clock edge executes.
    drive(1'b1, 4'd10, 8'h5A, 8'h00);
    drive(1'b0, 4'd0, 8'hFF, 8'h01);
    start = gated_edges;
    for (int i = 0; i < 11; i++) drive(1'b0, 4'(i), W'($urandom), W'($urandom));
    @(posedge clk); #1;
    expect_edges(start, 12, "EN low, Q high for 12 cycles");

    // Random mix: EN held for random stretches, random instructions.
    for (int cyc = 0; cyc < RANDOM_CYCLES; ) begin
      int len;
      logic e;
      len = $urandom_range(1, 12);
      e = 1'($urandom_range(0, 1));
      for (int k = 0; k < len; k++) begin
        drive(e, 4'($urandom_range(0, 15)), W'($urandom), W'($urandom));
        cyc++;
      end
    end
    @(posedge clk); #2;

    checks++;
    if (gclk_rises != gated_edges) begin
      failures++;
      $display("FAIL: %0d gclk rising edges, model predicts %0d", gclk_rises, gated_edges);
    end
    expect_counter(n_half_rate, "half-rate gated edge (EN high)");
    expect_counter(n_full_rate, "full-rate gated edge (EN low, Q high)");
    expect_counter(n_stopped, "stopped clock with changed inputs (EN low, Q low)");
    expect_counter(n_carry, "carry or borrow");
    expect_counter(n_invalid, "code outside the instruction set");
    foreach (n_instr[i]) expect_counter(n_instr[i], $sformatf("instruction %0d", i));
    $display("gated edges %0d (half rate %0d, full rate %0d), stopped cycles %0d, carries %0d, invalid codes %0d",
             gated_edges, n_half_rate, n_full_rate, n_stopped, n_carry, n_invalid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
