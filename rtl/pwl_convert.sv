// Piecewise-linear function unit shared by the FLC and the LFC.
//
// Approximates g(x) on x in [0,1), x given as a 23-bit fraction, by 128 straight
// lines. The 7 MSBs of x select the line; the shift LUT (7 in, 7 out) gives the
// line's start value, the coarse part of the result; the slope LUT (7 in, 7 out)
// gives its slope. The 16 LSBs of x (the remainder) times the slope, formed by the
// three-LUT 7x16 multiplier, is the fine part:
//   y = shift[i] * 2^16 + (slope[i] * rem) >> 6          (23-bit result, saturated)
// with shift[i] = round(128*g(i/128)) and
//      slope[i] = round(8192*(g((i+1)/128) - g(i/128))).
// IS_EXP = 0 gives g(x) = log2(1+x) (FLC); IS_EXP = 1 gives g(x) = 2^x - 1 (LFC).
// Both LUTs are computed at elaboration with integer (Q2.30) arithmetic.
//
// Timing: two pipeline registers, one after the multiplier and one on the output, so
// the result and its side-band word appear 2 clocks after in_valid. A new input can be
// taken every clock; there is no stall.
// The 128 segments, the 7-bit LUTs, the 16-bit remainder, the three-LUT multiplier and
// the two storage points follow the converter design; the rounding of the LUT entries,
// the scale of the slope and the saturation at the top of the range are this design's.
module pwl_convert #(
  parameter bit          IS_EXP = 1'b0,
  parameter int unsigned SB_W   = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [22:0]     in_x,
  input  logic [SB_W-1:0] in_sb,
  output logic            out_valid,
  output logic [22:0]     out_y,
  output logic [SB_W-1:0] out_sb
);
  localparam int unsigned SEGS = 128;

  // log2(1 + i/128) in Q2.30, by repeated squaring.
  function automatic longint log2_q30(int i);
    longint x, y;
    x = (longint'(1) << 30) + (longint'(i) << 23);
    y = 0;
    for (int b = 29; b >= 0; b--) begin
      x = (x * x) >>> 30;
      if (x >= (longint'(2) << 30)) begin
        x = x >>> 1;
        y = y | (longint'(1) << b);
      end
    end
    return y;
  endfunction

  function automatic longint unsigned isqrt64(longint unsigned n);
    longint unsigned r, t;
    r = 0;
    for (int b = 31; b >= 0; b--) begin
      t = r | (longint'(1) << b);
      if (t * t <= n) r = t;
    end
    return r;
  endfunction

  // 2^(i/128) - 1 in Q2.30, as a product of the roots 2^(2^-k).
  function automatic longint exp2m1_q30(int i);
    longint unsigned root, p;
    if (i >= SEGS) return longint'(1) << 30;
    root = longint'(2) << 30;
    p    = longint'(1) << 30;
    for (int k = 1; k <= 7; k++) begin
      root = isqrt64(root << 30);
      if (((i >> (7 - k)) & 1) != 0) p = (p * root) >> 30;
    end
    return longint'(p) - (longint'(1) << 30);
  endfunction

  function automatic longint g_q30(int i);
    return IS_EXP ? exp2m1_q30(i) : log2_q30(i);
  endfunction

  logic [6:0] shift_lut [SEGS];
  logic [6:0] slope_lut [SEGS];

  for (genvar i = 0; i < SEGS; i++) begin : g_lut
    localparam longint G0 = g_q30(i);
    localparam longint G1 = g_q30(i + 1);
    localparam longint SH = (G0 + (longint'(1) << 22)) >>> 23;
    localparam longint SL = ((G1 - G0) + (longint'(1) << 16)) >>> 17;
    assign shift_lut[i] = (SH > 127) ? 7'd127 : 7'(SH);
    assign slope_lut[i] = (SL > 127) ? 7'd127 : 7'(SL);
  end

  // Stage 1: LUTs and multiplier.
  logic [6:0]  idx;
  logic [15:0] rem;
  logic [22:0] prod;

  assign idx = in_x[22:16];
  assign rem = in_x[15:0];

  lut_mult_7x16 u_mult (.a(slope_lut[idx]), .b(rem), .p(prod));

  logic            v1;
  logic [6:0]      shift1;
  logic [22:0]     prod1;
  logic [SB_W-1:0] sb1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
  end

  always_ff @(posedge clk) begin
    shift1 <= shift_lut[idx];
    prod1  <= prod;
    sb1    <= in_sb;
  end

  // Stage 2: coarse + fine, saturated to 23 bits.
  logic [23:0] sum;
  assign sum = {1'b0, shift1, 16'b0} + 24'(prod1 >> 6);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v1;
  end

  always_ff @(posedge clk) begin
    out_y  <= sum[23] ? 23'h7F_FFFF : sum[22:0];
    out_sb <= sb1;
  end
endmodule
