// 23-bit general ALU. The processor has two of them working side by side: ALU1 on
// the fraction (float mantissa or LNS fraction), ALU2 on the high part (exponent and
// sign, or LNS integer part and sign). Chaining ALU1's carry into ALU2's cin lets the
// pair add or subtract a 31-bit LNS exponent in two steps.
//
// A right shifter sits in front of the adder and can act on either operand (shsel,
// shamt), so one pass can align and add float mantissas. ALU_SHR shifts {cin, a}, so a
// carry out of a mantissa addition can be shifted back in during normalisation.
// For subtraction cout is the borrow (1 when the result went below zero).
//
// Combinational: y, cout and zero follow a, b, op in the same clock.
// The width and the split between the two ALUs follow the processor description; the
// operation set, the pre-shifter and the flag meanings are this design's choices.
module alu23
  import fpslns_pkg::*;
(
  input  alu_op_e     op,
  input  alu_shsel_e  shsel,
  input  logic [4:0]  shamt,
  input  logic [22:0] a,
  input  logic [22:0] b,
  input  logic        cin,
  output logic [22:0] y,
  output logic        cout,
  output logic        zero
);
  logic [22:0] x_op, y_op;
  logic [23:0] r;
  logic [45:0] wide;

  always_comb begin
    x_op = (shsel == SH_A) ? (a >> shamt) : a;
    y_op = (shsel == SH_B) ? (b >> shamt) : b;
    wide = '0;
    r    = '0;
    unique case (op)
      ALU_ADD:   r = {1'b0, x_op} + {1'b0, y_op};
      ALU_ADC:   r = {1'b0, x_op} + {1'b0, y_op} + 24'(cin);
      ALU_SUB:   r = {1'b0, x_op} - {1'b0, y_op};
      ALU_SBB:   r = {1'b0, x_op} - {1'b0, y_op} - 24'(cin);
      ALU_RSUB:  r = {1'b0, y_op} - {1'b0, x_op};
      ALU_AND:   r = {1'b0, x_op & y_op};
      ALU_OR:    r = {1'b0, x_op | y_op};
      ALU_XOR:   r = {1'b0, x_op ^ y_op};
      ALU_PASSA: r = {1'b0, x_op};
      ALU_PASSB: r = {1'b0, y_op};
      ALU_SHR: begin
        wide = {cin, a, 22'b0} >> shamt;
        r    = {1'b0, wide[44:22]};
      end
      ALU_SHL: begin
        wide = {23'b0, a} << shamt;
        r    = {|wide[45:23], wide[22:0]};
      end
      default:   r = '0;
    endcase
    y    = r[22:0];
    cout = r[23];
    zero = (r[22:0] == '0);
  end
endmodule
