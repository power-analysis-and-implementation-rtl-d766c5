// logic_unit: the logic half of the gated ALU.
//
// On a rising edge of its (gated) clock, while load is high, it registers a
// bitwise function of A and B: AND, OR, XOR, NAND, NOR, XNOR or NOT A. While
// load is low, or while the clock is gated off, the register holds.
//
// The unit and its gated clock follow the published design; the choice of
// the seven operations, the load qualifier and the asynchronous active-low
// reset are this design's.
//
// Interface: clk (gated clock), rst_n, load, op (alu_pkg::logic_op_e), a, b
// in; y out. Timing: one gated clock edge from operands to y.
module logic_unit
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic_op_e        op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);

  logic [WIDTH-1:0] f;

  always_comb begin
    unique case (op)
      LG_AND:  f = a & b;
      LG_OR:   f = a | b;
      LG_XOR:  f = a ^ b;
      LG_NAND: f = ~(a & b);
      LG_NOR:  f = ~(a | b);
      LG_XNOR: f = ~(a ^ b);
      LG_NOT:  f = ~a;
      default: f = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    y <= '0;
    else if (load) y <= f;
  end

endmodule
