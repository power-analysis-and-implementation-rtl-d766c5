// arithmetic_unit: the arithmetic half of the gated ALU.
//
// On a rising edge of its (gated) clock, while load is high, it computes
// A+B, A-B, A+1 or A-1 and registers the WIDTH-bit result together with the
// carry out (add, increment) or borrow (subtract, decrement). While load is
// low, or while the clock is gated off, the registers hold, so the unit does
// not switch when it is not in use.
//
// The unit's place in the ALU and its gated clock follow the published
// design; the choice of the four operations, the carry/borrow output, the
// load qualifier and the asynchronous active-low reset are this design's.
//
// Interface: clk (gated clock), rst_n, load, op (alu_pkg::arith_op_e), a, b
// in; y, carry out. Timing: one gated clock edge from operands to y.
module arithmetic_unit
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  arith_op_e        op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y,
  output logic             carry
);

  logic [WIDTH:0] sum;

  always_comb begin
    unique case (op)
      AR_ADD: sum = {1'b0, a} + {1'b0, b};
      AR_SUB: sum = {1'b0, a} - {1'b0, b};
      AR_INC: sum = {1'b0, a} + (WIDTH+1)'(1);
      AR_DEC: sum = {1'b0, a} - (WIDTH+1)'(1);
      default: sum = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y     <= '0;
      carry <= 1'b0;
    end else if (load) begin
      y     <= sum[WIDTH-1:0];
      carry <= sum[WIDTH];
    end
  end

endmodule
