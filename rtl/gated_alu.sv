// gated_alu: 8-bit ALU whose clock is gated by a T flip-flop.
//
// The system clock reaches the ALU only through tff_clock_gate: the clock is
// ANDed with the Q output of a T flip-flop whose T input is the EN pin. EN
// high gives the ALU a half-frequency clock; EN low freezes Q, which either
// leaves the clock running (Q=1) or stops it (Q=0) so that the ALU's
// registers and the logic they feed stop switching. On each gated clock edge
// the 4-bit opcode is decoded into one of eleven instructions; the selected
// unit (arithmetic_unit or logic_unit) registers its result while the other
// holds, and a unit-select register records which unit the output shows.
// While the gated clock is stopped the output holds the last result.
//
// The T flip-flop clock gate, the split into an arithmetic and a logic unit
// both driven by the gated clock, the 8-bit width and the count of eleven
// instructions follow the published design. The instruction list and
// encoding (alu_pkg), the carry output, the treatment of codes 11..15 (no
// unit selected, output 0) and the reset are this design's choices.
//
// Interface: clk, rst_n (asynchronous, active low), en, opcode, a, b in;
// result, carry, the gating flip-flop state gate_q and the gated clock gclk
// out.
// Timing: a, b and opcode are sampled on the rising edges of gclk; result
// and carry change right after such an edge. en is sampled on the falling
// edge of clk.
module gated_alu
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [3:0]       opcode,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] result,
  output logic             carry,
  output logic             gate_q,
  output logic             gclk
);

  decoded_t         dec;
  unit_e            out_unit;
  logic [WIDTH-1:0] arith_y, logic_y;
  logic             arith_c;

  tff_clock_gate u_gate (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .q    (gate_q),
    .gclk (gclk)
  );

  assign dec = decode(opcode);

  arithmetic_unit #(.WIDTH(WIDTH)) u_arith (
    .clk  (gclk),
    .rst_n(rst_n),
    .load (dec.unit == UNIT_ARITH),
    .op   (dec.arith_op),
    .a    (a),
    .b    (b),
    .y    (arith_y),
    .carry(arith_c)
  );

  logic_unit #(.WIDTH(WIDTH)) u_logic (
    .clk  (gclk),
    .rst_n(rst_n),
    .load (dec.unit == UNIT_LOGIC),
    .op   (dec.logic_op),
    .a    (a),
    .b    (b),
    .y    (logic_y)
  );

  // Records which unit executed the last instruction.
  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) out_unit <= UNIT_NONE;
    else        out_unit <= dec.unit;
  end

  // Output stage.
  always_comb begin
    unique case (out_unit)
      UNIT_ARITH: begin result = arith_y; carry = arith_c; end
      UNIT_LOGIC: begin result = logic_y; carry = 1'b0;    end
      default:    begin result = '0;      carry = 1'b0;    end
    endcase
  end

endmodule
