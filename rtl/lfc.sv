// LFC: LNS to float (IEEE 754 single) converter.
//
// Mirror of the FLC: the LNS integer part n becomes the biased exponent n + 127, and
// the float fraction is 2^x - 1 of the LNS fraction x from the piecewise-linear unit
// (pwl_convert with the exponential tables). The LNS zero code (integer -128) and
// integers that give a biased exponent below 1 (-127) produce a signed float zero;
// subnormals are not produced. These special cases are this design's choice.
//
// Interface: in_valid/in_data (LNS), out_valid/out_data (float) with a SB_W-bit
// side-band word. Latency 2 clocks, one conversion per clock.
module lfc #(
  parameter int unsigned SB_W = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [31:0]     in_data,
  input  logic [SB_W-1:0] in_sb,
  output logic            out_valid,
  output logic [31:0]     out_data,
  output logic [SB_W-1:0] out_sb
);
  typedef struct packed {
    logic            sign;
    logic            zero;
    logic [7:0]      exp;
    logic [SB_W-1:0] sb;
  } side_t;

  side_t       s_in, s_out;
  logic [7:0]  n;
  logic [22:0] frac;

  assign n             = in_data[30:23];
  assign s_in.sign     = in_data[31];
  assign s_in.zero     = ($signed(n) < $signed(8'(-126)));
  assign s_in.exp      = n + 8'd127;
  assign s_in.sb       = in_sb;

  pwl_convert #(.IS_EXP(1'b1), .SB_W($bits(side_t))) u_pwl (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_x     (in_data[22:0]),
    .in_sb    (s_in),
    .out_valid(out_valid),
    .out_y    (frac),
    .out_sb   (s_out)
  );

  assign out_data = s_out.zero ? {s_out.sign, 31'd0} : {s_out.sign, s_out.exp, frac};
  assign out_sb   = s_out.sb;
endmodule
