// LUT sub-multiplier: an unsigned A_W x B_W product read from a ROM.
//
// The ROM is addressed by {a, b} and holds a*b in every entry, the way an FPGA
// multiplier is built from look-up tables instead of a hard multiplier block. The
// table is filled at elaboration from the address; there is no clock.
//
//   a, b : operands          p : a*b, A_W+B_W bits, combinational
module lut_submult #(
  parameter int unsigned A_W = 7,
  parameter int unsigned B_W = 6
) (
  input  logic [A_W-1:0]     a,
  input  logic [B_W-1:0]     b,
  output logic [A_W+B_W-1:0] p
);
  localparam int unsigned N = 1 << (A_W + B_W);

  logic [A_W+B_W-1:0] rom [N];

  for (genvar k = 0; k < N; k++) begin : g_rom
    localparam logic [A_W+B_W-1:0] AV = (A_W+B_W)'(k >> B_W);
    localparam logic [A_W+B_W-1:0] BV = (A_W+B_W)'(k % (1 << B_W));
    assign rom[k] = AV * BV;
  end

  assign p = rom[{a, b}];
endmodule
