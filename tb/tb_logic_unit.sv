// tb_logic_unit: self-checking test of the logic unit.
//
// Drives every operation with random operands, with load both high and low,
// and compares y after each rising clock edge with a bit-by-bit model built
// from a truth table per operation.
`timescale 1ns/1ps
module tb_logic_unit;
  import alu_pkg::*;

  localparam int unsigned W = 8;

  logic clk = 1'b0;
  logic rst_n;
  logic load;
  logic_op_e op;
  logic [W-1:0] a, b, y;

  int checks = 0;
  int failures = 0;
  logic [W-1:0] exp_y;
  int op_seen [7];

  logic_unit dut (
    .clk(clk), .rst_n(rst_n), .load(load), .op(op), .a(a), .b(b), .y(y)
  );

  always #5 clk = ~clk;

  // Truth table per operation, indexed by {a_bit, b_bit}.
  function automatic logic [3:0] table_of(logic_op_e o);
    case (o)
      LG_AND:  return 4'b1000;
      LG_OR:   return 4'b1110;
      LG_XOR:  return 4'b0110;
      LG_NAND: return 4'b0111;
      LG_NOR:  return 4'b0001;
      LG_XNOR: return 4'b1001;
      default: return 4'b0011;   // NOT A: 1 where a_bit is 0
    endcase
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic_op_e o, input logic [W-1:0] av, input logic [W-1:0] bv,
                       input logic ld);
    logic [3:0] t;
    @(negedge clk);
    op = o; a = av; b = bv; load = ld;
    if (ld) begin
      t = table_of(o);
      for (int i = 0; i < W; i++) exp_y[i] = t[{av[i], bv[i]}];
      op_seen[int'(o)]++;
    end
    @(posedge clk); #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL: op=%s a=%h b=%h load=%b -> y=%h, expected %h", o.name(), av, bv, ld,
               y, exp_y);
    end
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b0; op = LG_AND; a = '0; b = '0; exp_y = '0;
    foreach (op_seen[i]) op_seen[i] = 0;
    #12;
    checks++;
    if (y !== '0) begin failures++; $display("FAIL: reset value"); end
    rst_n = 1'b1;
    for (int o = 0; o < 7; o++) apply(logic_op_e'(o), 8'b1100_1010, 8'b1010_0110, 1'b1);
    repeat (2000) begin
      apply(logic_op_e'($urandom_range(0, 6)), W'($urandom), W'($urandom),
            ($urandom_range(0, 7) != 0));
    end
    foreach (op_seen[i]) begin
      checks++;
      if (op_seen[i] == 0) begin failures++; $display("FAIL: operation %0d never run", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
