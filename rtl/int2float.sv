// Integer-to-float sub-unit of the central unit: converts a 32-bit two's complement
// integer to IEEE 754 single precision. The magnitude is normalised with a leading-one
// search; bits below the 24-bit mantissa are truncated (round toward zero).
// Combinational. The rounding mode is this design's choice.
module int2float (
  input  logic [31:0] i,
  output logic [31:0] f
);
  logic        s;
  logic [31:0] mag, norm;
  logic [4:0]  msb;

  always_comb begin
    s   = i[31];
    mag = s ? (~i + 32'd1) : i;
    msb = '0;
    for (int k = 0; k < 32; k++) if (mag[k]) msb = 5'(k);
    norm = mag << (5'd31 - msb);
    if (mag == '0) f = '0;
    else           f = {s, 8'(8'd127 + 8'(msb)), norm[30:8]};
  end
endmodule
