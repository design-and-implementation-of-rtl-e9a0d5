// Shared types and constants of the hybrid FPS/LNS processor.
//
// Number formats (both 32 bits):
//   float : IEEE 754 single precision {sign, exponent[7:0] (bias 127), fraction[22:0]}
//   LNS   : {sign, integer[7:0] (two's complement), fraction[22:0]}, value = +-2^(integer.fraction)
// The 1/8/23 LNS split is the single-precision-equivalent format the design is built around.
// The LNS code with integer -128 and fraction 0 stands for zero (this design's choice).
//
// Inside the processor a 32-bit value is kept in two 23-bit registers: the low register
// holds the fraction (ALU1), the high register holds {sign at bit 22, zeros, exponent or
// LNS integer in bits 7:0} (ALU2).
package fpslns_pkg;

  localparam int unsigned WORD_W   = 32;  // memory word
  localparam int unsigned REG_W    = 23;  // register and ALU width
  localparam int unsigned NUM_REGS = 10;  // R0..R9
  localparam int unsigned RADDR_W  = 4;
  localparam int unsigned FRAC_W   = 23;
  localparam int unsigned EXP_W    = 8;

  // Type bit that selects one of the twin memories.
  typedef enum logic {
    T_FLOAT = 1'b0,
    T_LNS   = 1'b1
  } var_type_e;

  localparam logic [7:0]  LNS_ZERO_INT = 8'h80;  // integer part of the LNS zero code
  localparam logic [31:0] LNS_ZERO     = 32'h4000_0000;  // {0, 8'h80, 23'h0}

  // ALU operations.
  typedef enum logic [3:0] {
    ALU_ADD   = 4'd0,   // x + y + 0
    ALU_ADC   = 4'd1,   // x + y + cin
    ALU_SUB   = 4'd2,   // x - y
    ALU_SBB   = 4'd3,   // x - y - cin
    ALU_RSUB  = 4'd4,   // y - x
    ALU_AND   = 4'd5,
    ALU_OR    = 4'd6,
    ALU_XOR   = 4'd7,
    ALU_PASSA = 4'd8,
    ALU_PASSB = 4'd9,
    ALU_SHR   = 4'd10,  // {cin, a} >> shamt, low 23 bits
    ALU_SHL   = 4'd11   // a << shamt
  } alu_op_e;

  // Which operand the right-shifter in front of the adder acts on.
  typedef enum logic [1:0] {
    SH_NONE = 2'd0,
    SH_A    = 2'd1,
    SH_B    = 2'd2
  } alu_shsel_e;

  // Instruction word: [31:28] opcode, [26:18] field D, [17:9] field A, [8:0] field B.
  typedef enum logic [3:0] {
    OP_NOP  = 4'h0,
    OP_LDF  = 4'h1,  // D=addr, next word: float value      -> memory (float form)
    OP_LDL  = 4'h2,  // D=addr, next word: LNS value        -> memory (LNS form)
    OP_LDI  = 4'h3,  // D=addr, next word: signed integer   -> float -> memory
    OP_OUTF = 4'h4,  // A=addr: send float form to output
    OP_OUTL = 4'h5,  // A=addr: send LNS form to output
    OP_LDR  = 4'h6,  // D=reg,  next word: integer          -> register
    OP_OUTR = 4'h7,  // A=reg:  send register to output
    OP_FADD = 4'h8,  // M[D] = M[A] + M[B]  (float form)
    OP_FSUB = 4'h9,  // M[D] = M[A] - M[B]  (float form)
    OP_FMUL = 4'hA,  // M[D] = M[A] * M[B]  (LNS form)
    OP_FDIV = 4'hB,  // M[D] = M[A] / M[B]  (LNS form)
    OP_IADD = 4'hC,  // R0 = R0 + R[B]
    OP_ISUB = 4'hD,  // R0 = R0 - R[B]
    OP_MOVR = 4'hE   // R[D] = R[B]
  } opcode_e;

endpackage
