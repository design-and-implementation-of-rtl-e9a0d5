// 7 x 16-bit unsigned multiplier made of three LUT sub-multipliers.
//
// The 16-bit operand b is cut into three slices, b[15:10] (6 bits), b[9:5] and b[4:0]
// (5 bits each). Each slice is multiplied by the 7-bit operand a in its own ROM
// (lut_submult). Two shift-and-add stages then combine the partial products:
//   stage 1: s = p_lo + (p_mid << 5)
//   stage 2: p = s    + (p_hi  << 10)
// giving the 23-bit product. The three-LUT structure and the two shift/add stages
// follow the converter design this multiplier belongs to; the 6/5/5 slicing is this
// design's choice. Purely combinational: the converters place their pipeline register
// right after it.
module lut_mult_7x16 (
  input  logic [6:0]  a,
  input  logic [15:0] b,
  output logic [22:0] p
);
  logic [12:0] p_hi;
  logic [11:0] p_mid, p_lo;
  logic [17:0] s;

  lut_submult #(.A_W(7), .B_W(6)) u_hi  (.a(a), .b(b[15:10]), .p(p_hi));
  lut_submult #(.A_W(7), .B_W(5)) u_mid (.a(a), .b(b[9:5]),   .p(p_mid));
  lut_submult #(.A_W(7), .B_W(5)) u_lo  (.a(a), .b(b[4:0]),   .p(p_lo));

  always_comb begin
    s = 18'(p_lo) + (18'(p_mid) << 5);
    p = 23'(s) + (23'(p_hi) << 10);
  end
endmodule
