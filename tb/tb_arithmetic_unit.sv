// tb_arithmetic_unit: self-checking test of the arithmetic unit.
//
// Drives random and corner-case operands and operations, with load both high
// and low, and compares y and carry after each rising clock edge with a
// model computed here in plain integer arithmetic.
`timescale 1ns/1ps
module tb_arithmetic_unit;
  import alu_pkg::*;

  localparam int unsigned W = 8;

  logic clk = 1'b0;
  logic rst_n;
  logic load;
  arith_op_e op;
  logic [W-1:0] a, b, y;
  logic carry;

  int checks = 0;
  int failures = 0;
  logic [W-1:0] exp_y;
  logic exp_c;

  arithmetic_unit dut (
    .clk(clk), .rst_n(rst_n), .load(load), .op(op), .a(a), .b(b), .y(y), .carry(carry)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input arith_op_e o, input logic [W-1:0] av, input logic [W-1:0] bv,
                       input logic ld);
    int ia, ib, r;
    @(negedge clk);
    op = o; a = av; b = bv; load = ld;
    ia = int'(av); ib = int'(bv);
    if (ld) begin
      case (o)
        AR_ADD: r = ia + ib;
        AR_SUB: r = ia - ib;
        AR_INC: r = ia + 1;
        default: r = ia - 1;
      endcase
      exp_y = W'(r);
      exp_c = (r < 0) || (r > (1 << W) - 1);
    end
    @(posedge clk); #1;
    checks++;
    if (y !== exp_y || carry !== exp_c) begin
      failures++;
      $display("FAIL: op=%s a=%0d b=%0d load=%b -> y=%0d c=%b, expected y=%0d c=%b",
               o.name(), av, bv, ld, y, carry, exp_y, exp_c);
    end
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b0; op = AR_ADD; a = '0; b = '0;
    exp_y = '0; exp_c = 1'b0;
    #12;
    checks++;
    if (y !== '0 || carry !== 1'b0) begin failures++; $display("FAIL: reset value"); end
    rst_n = 1'b1;
    apply(AR_ADD, 8'hFF, 8'h01, 1'b1);   // carry out
    apply(AR_ADD, 8'h12, 8'h34, 1'b1);
    apply(AR_SUB, 8'h00, 8'h01, 1'b1);   // borrow
    apply(AR_SUB, 8'h80, 8'h7F, 1'b1);
    apply(AR_INC, 8'hFF, 8'h00, 1'b1);   // wrap with carry
    apply(AR_DEC, 8'h00, 8'h00, 1'b1);   // wrap with borrow
    apply(AR_DEC, 8'h55, 8'h00, 1'b1);
    apply(AR_ADD, 8'hAA, 8'hAA, 1'b0);   // load low: hold
    repeat (3000) begin
      apply(arith_op_e'($urandom_range(0, 3)), W'($urandom), W'($urandom),
            ($urandom_range(0, 7) != 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
