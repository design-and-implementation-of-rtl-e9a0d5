// Hybrid FPS/LNS processor, top level.
//
// Every variable lives twice in the twin memory, once as an IEEE 754 float and once
// as an LNS number, at the same address. Float add/subtract run on the float copies
// and multiply/divide on the LNS copies, where they become fixed-point add/subtract,
// so neither kind of operation needs slow hardware. Each result is written in its own
// form and the memory management unit converts it into the other form in parallel
// with the next instructions, using the piecewise-linear FLC/LFC converters.
//
// Blocks: I/O unit (input/output buffers), central unit (fetch, decode, control),
// registers unit (R0..R9, 23 bits), ALU1 (fractions, main register R0) and ALU2
// (exponent/integer and sign, main register R1), memory management unit (twin
// memory, FLC, LFC).
//
// Interface: a 32-bit instruction/data stream in (in_valid/in_ready) and a 32-bit
// result stream out (out_valid/out_ready); busy is high while an instruction is in
// progress. The encoding is in fpslns_pkg. Clock counts per instruction: fetch 1,
// IADD/ISUB 1 execute, FMUL/FDIV 2 execute, FADD/FSUB 3 execute, plus operand reads
// and write-back; a converted copy is ready 2 clocks after a write.
module hybrid_processor
  import fpslns_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 512,  // words per memory (2 x 2 KB)
  parameter int unsigned IO_DEPTH  = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data,
  output logic        busy
);
  localparam int unsigned AW = $clog2(MEM_DEPTH);

  // I/O <-> central unit
  logic        cu_in_valid, cu_in_ready, cu_out_valid, cu_out_ready;
  logic [31:0] cu_in_data, cu_out_data;
  // central unit <-> MMU
  logic          w_valid, w_ready, r_valid, r_ready, r_rvalid;
  var_type_e     w_type, r_type;
  logic [AW-1:0] w_addr, r_addr;
  logic [31:0]   w_data, r_data;
  // registers
  logic [RADDR_W-1:0] ra1, ra2, wa1, wa2;
  logic [REG_W-1:0]   rd1, rd2, wd1, wd2, r0, r1;
  logic               we1, we2;
  // ALUs
  alu_op_e     alu1_op, alu2_op;
  alu_shsel_e  alu1_shsel;
  logic [4:0]  alu1_shamt;
  logic [REG_W-1:0] alu1_b, alu2_b, alu1_y, alu2_y;
  logic        alu1_cin, alu2_cin, alu1_cout, alu2_cout, alu1_zero, alu2_zero;

  io_unit #(.DEPTH(IO_DEPTH)) u_io (
    .clk, .rst_n,
    .ext_in_valid (in_valid),     .ext_in_ready (in_ready),     .ext_in_data (in_data),
    .ext_out_valid(out_valid),    .ext_out_ready(out_ready),    .ext_out_data(out_data),
    .cu_in_valid  (cu_in_valid),  .cu_in_ready  (cu_in_ready),  .cu_in_data  (cu_in_data),
    .cu_out_valid (cu_out_valid), .cu_out_ready (cu_out_ready), .cu_out_data (cu_out_data)
  );

  central_unit #(.AW(AW)) u_cu (
    .clk, .rst_n,
    .in_valid (cu_in_valid),  .in_ready (cu_in_ready),  .in_data (cu_in_data),
    .out_valid(cu_out_valid), .out_ready(cu_out_ready), .out_data(cu_out_data),
    .w_valid, .w_ready, .w_type, .w_addr, .w_data,
    .r_valid, .r_ready, .r_type, .r_addr, .r_rvalid, .r_data,
    .ra1, .rd1, .ra2, .rd2, .we1, .wa1, .wd1, .we2, .wa2, .wd2, .r0, .r1,
    .alu1_op, .alu1_shsel, .alu1_shamt, .alu1_b, .alu1_cin, .alu1_y, .alu1_cout,
    .alu2_op, .alu2_b, .alu2_cin, .alu2_y,
    .busy
  );

  register_file u_regs (
    .clk, .rst_n,
    .ra1, .rd1, .ra2, .rd2,
    .we1, .wa1, .wd1, .we2, .wa2, .wd2,
    .r0, .r1
  );

  alu23 u_alu1 (
    .op(alu1_op), .shsel(alu1_shsel), .shamt(alu1_shamt),
    .a(r0), .b(alu1_b), .cin(alu1_cin),
    .y(alu1_y), .cout(alu1_cout), .zero(alu1_zero)
  );

  alu23 u_alu2 (
    .op(alu2_op), .shsel(SH_NONE), .shamt(5'd0),
    .a(r1), .b(alu2_b), .cin(alu2_cin),
    .y(alu2_y), .cout(alu2_cout), .zero(alu2_zero)
  );

  mmu #(.DEPTH(MEM_DEPTH), .AW(AW)) u_mmu (
    .clk, .rst_n,
    .w_valid, .w_ready, .w_type, .w_addr, .w_data,
    .r_valid, .r_ready, .r_type, .r_addr, .r_rvalid, .r_data
  );
endmodule
