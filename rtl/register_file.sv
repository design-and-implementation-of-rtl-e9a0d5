// Registers unit: ten 23-bit registers R0..R9 used as the processor's internal
// scratch storage. R0 is wired to ALU1 as its main operand and R1 to ALU2.
//
// Two asynchronous read ports (ALU1's and ALU2's second operand) and two write ports
// (one per ALU result). A write is seen by the reads from the next clock on. If both
// write ports address the same register, port 2 wins. All registers reset to zero.
// The count and width of the registers and the R0/R1 roles follow the processor
// description; the port count and the write priority are this design's choices.
module register_file
  import fpslns_pkg::*;
#(
  parameter int unsigned N = NUM_REGS,
  parameter int unsigned W = REG_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [RADDR_W-1:0] ra1,
  output logic [W-1:0]       rd1,
  input  logic [RADDR_W-1:0] ra2,
  output logic [W-1:0]       rd2,
  input  logic               we1,
  input  logic [RADDR_W-1:0] wa1,
  input  logic [W-1:0]       wd1,
  input  logic               we2,
  input  logic [RADDR_W-1:0] wa2,
  input  logic [W-1:0]       wd2,
  output logic [W-1:0]       r0,
  output logic [W-1:0]       r1
);
  logic [W-1:0] regs [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else begin
      if (we1 && wa1 < RADDR_W'(N)) regs[wa1] <= wd1;
      if (we2 && wa2 < RADDR_W'(N)) regs[wa2] <= wd2;
    end
  end

  assign rd1 = (ra1 < RADDR_W'(N)) ? regs[ra1] : '0;
  assign rd2 = (ra2 < RADDR_W'(N)) ? regs[ra2] : '0;
  assign r0  = regs[0];
  assign r1  = regs[1];
endmodule
