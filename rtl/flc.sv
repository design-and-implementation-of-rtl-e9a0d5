// FLC: float (IEEE 754 single) to LNS converter.
//
// The sign is kept, the biased exponent becomes the LNS integer part (e - 127, two's
// complement), and the LNS fraction is log2(1.f) from the piecewise-linear unit
// (pwl_convert, 128 lines, 7-bit shift and slope LUTs, 7x16 LUT multiplier).
// Exponent 0 (zero and subnormals) gives the LNS zero code {s, -128, 0}; exponent 255
// (infinity, NaN) saturates to the largest LNS magnitude. These special cases are this
// design's choice.
//
// Interface: in_valid/in_data (float), out_valid/out_data (LNS) with a SB_W-bit
// side-band word carried alongside. Latency 2 clocks, one conversion per clock.
module flc #(
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
  import fpslns_pkg::*;

  typedef struct packed {
    logic            sign;
    logic            zero;
    logic            sat;
    logic [7:0]      int_part;
    logic [SB_W-1:0] sb;
  } side_t;

  side_t      s_in, s_out;
  logic [7:0] e;
  logic [22:0] frac;

  assign e             = in_data[30:23];
  assign s_in.sign     = in_data[31];
  assign s_in.zero     = (e == 8'd0);
  assign s_in.sat      = (e == 8'hFF);
  assign s_in.int_part = e - 8'd127;
  assign s_in.sb       = in_sb;

  pwl_convert #(.IS_EXP(1'b0), .SB_W($bits(side_t))) u_pwl (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_x     (in_data[22:0]),
    .in_sb    (s_in),
    .out_valid(out_valid),
    .out_y    (frac),
    .out_sb   (s_out)
  );

  always_comb begin
    if (s_out.zero)     out_data = {s_out.sign, LNS_ZERO_INT, 23'd0};
    else if (s_out.sat) out_data = {s_out.sign, 8'h7F, 23'h7F_FFFF};
    else                out_data = {s_out.sign, s_out.int_part, frac};
  end
  assign out_sb = s_out.sb;
endmodule
