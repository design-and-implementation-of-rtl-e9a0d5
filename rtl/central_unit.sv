// Central unit: fetches and executes the instruction stream.
//
// Instructions and their data words arrive through the I/O unit's input buffer
// (fetch takes 1 clock). The decoder classifies every operation by the number form it
// needs: float add/subtract read the float copies of their operands, multiply/divide
// read the LNS copies (the log/float selector). Operands are fetched from the memory
// management unit and split over two registers each: the fraction or mantissa in R0/R2
// (ALU1 side), {sign, exponent or LNS integer} in R1/R3 (ALU2 side). The two ALUs then
// work on both halves at once:
//   FMUL / FDIV (LNS)  EX1: ALU1 adds/subtracts the fractions; EX2: ALU2 adds/subtracts
//                      the integer parts with ALU1's carry. 2 clocks.
//   FADD / FSUB (FPS)  EX1: ALU2 subtracts exponents while ALU1 compares mantissas;
//                      EX2: ALU1 aligns the smaller mantissa and adds/subtracts;
//                      EX3: ALU1 normalises, ALU2 corrects the exponent. 3 clocks.
//   IADD / ISUB        R0 = R0 +/- Rb on ALU1. 1 clock.
// Results are written back through the MMU, which keeps the other form up to date.
// Integers loaded with LDI are turned into floats by the int2float sub-unit.
//
// Instruction word (fpslns_pkg): [31:28] opcode, [26:18] D, [17:9] A, [8:0] B; the
// memory ops use 9-bit addresses, the register ops the low 4 bits of a field.
// The float mantissa is handled in 23 bits ({1, f[22:1]}) to fit the 23-bit ALU, so
// the LSB of a float add/sub result is 0 and the result is truncated. Subnormal
// inputs count as zero; overflow gives infinity (FPS) or the largest value (LNS).
// The task list, the two-ALU split and the clock counts follow the processor
// description; the instruction set, the encoding, the state sequence and the
// special-value rules are this design's own. Integer multiplication and the
// transcendental ("other") operations are not provided.
module central_unit
  import fpslns_pkg::*;
#(
  parameter int unsigned AW = 9
) (
  input  logic               clk,
  input  logic               rst_n,
  // I/O unit
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [31:0]        in_data,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [31:0]        out_data,
  // memory management unit
  output logic               w_valid,
  input  logic               w_ready,
  output var_type_e          w_type,
  output logic [AW-1:0]      w_addr,
  output logic [31:0]        w_data,
  output logic               r_valid,
  input  logic               r_ready,
  output var_type_e          r_type,
  output logic [AW-1:0]      r_addr,
  input  logic               r_rvalid,
  input  logic [31:0]        r_data,
  // registers unit
  output logic [RADDR_W-1:0] ra1,
  input  logic [REG_W-1:0]   rd1,
  output logic [RADDR_W-1:0] ra2,
  input  logic [REG_W-1:0]   rd2,
  output logic               we1,
  output logic [RADDR_W-1:0] wa1,
  output logic [REG_W-1:0]   wd1,
  output logic               we2,
  output logic [RADDR_W-1:0] wa2,
  output logic [REG_W-1:0]   wd2,
  input  logic [REG_W-1:0]   r0,
  input  logic [REG_W-1:0]   r1,
  // ALU1 (a = R0) and ALU2 (a = R1)
  output alu_op_e            alu1_op,
  output alu_shsel_e         alu1_shsel,
  output logic [4:0]         alu1_shamt,
  output logic [REG_W-1:0]   alu1_b,
  output logic               alu1_cin,
  input  logic [REG_W-1:0]   alu1_y,
  input  logic               alu1_cout,
  output alu_op_e            alu2_op,
  output logic [REG_W-1:0]   alu2_b,
  output logic               alu2_cin,
  input  logic [REG_W-1:0]   alu2_y,
  // status
  output logic               busy
);
  typedef enum logic [3:0] {
    S_FETCH, S_DATA, S_MWRITE, S_RDA, S_RDB, S_CAPB, S_EX1, S_EX2, S_EX3, S_WB, S_OUT
  } state_e;

  state_e        state, state_n;
  logic [31:0]   ir, ir_n;
  logic [31:0]   wbuf, wbuf_n;
  opcode_e       op;
  logic [AW-1:0] fd, fa, fb;

  // Flags carried between execute clocks.
  logic       carry, carry_n;
  logic       swap, swap_n;
  logic       eff_sub, eff_sub_n;
  logic       za, za_n, zb, zb_n;
  logic       rsign, rsign_n;
  logic       rzero, rzero_n;
  logic [4:0] dsh, dsh_n;

  logic [31:0] i2f;
  int2float u_i2f (.i(in_data), .f(i2f));

  assign op = opcode_e'(ir[31:28]);
  assign fd = ir[18 +: AW];
  assign fa = ir[9 +: AW];
  assign fb = ir[0 +: AW];

  function automatic logic is_lns_op(opcode_e o);
    return (o == OP_FMUL) || (o == OP_FDIV) || (o == OP_OUTL);
  endfunction

  function automatic logic is_fadd(opcode_e o);
    return (o == OP_FADD) || (o == OP_FSUB);
  endfunction

  // Split a memory word over a low (ALU1) and a high (ALU2) register.
  function automatic logic [REG_W-1:0] low_part(logic [31:0] w, logic mant);
    return mant ? {1'b1, w[22:1]} : w[22:0];
  endfunction

  function automatic logic [REG_W-1:0] high_part(logic [31:0] w);
    return {w[31], 14'b0, w[30:23]};
  endfunction

  function automatic logic [4:0] lzc23(logic [22:0] v);
    logic [4:0] n;
    n = 5'd23;
    for (int k = 0; k < 23; k++) if (v[k]) n = 5'(22 - k);
    return n;
  endfunction

  logic signed [9:0] ediff, enew;
  logic [4:0]        lz;
  logic              ovf;

  always_comb begin
    state_n   = state;
    ir_n      = ir;
    wbuf_n    = wbuf;
    carry_n   = carry;
    swap_n    = swap;
    eff_sub_n = eff_sub;
    za_n      = za;
    zb_n      = zb;
    rsign_n   = rsign;
    rzero_n   = rzero;
    dsh_n     = dsh;

    in_ready  = 1'b0;
    out_valid = 1'b0;
    out_data  = r_data;
    w_valid   = 1'b0;
    w_type    = T_FLOAT;
    w_addr    = fd;
    w_data    = wbuf;
    r_valid   = 1'b0;
    r_type    = is_lns_op(op) ? T_LNS : T_FLOAT;
    r_addr    = fa;
    ra1       = 4'd2;
    ra2       = 4'd3;
    we1       = 1'b0;
    wa1       = 4'd0;
    wd1       = alu1_y;
    we2       = 1'b0;
    wa2       = 4'd1;
    wd2       = alu2_y;
    alu1_op    = ALU_PASSA;
    alu1_shsel = SH_NONE;
    alu1_shamt = '0;
    alu1_b     = rd1;
    alu1_cin   = 1'b0;
    alu2_op    = ALU_PASSA;
    alu2_b     = rd2;
    alu2_cin   = 1'b0;
    ediff      = 10'(alu2_y[9:0]);
    enew       = 10'(alu2_y[9:0]);
    lz         = lzc23(r0);
    ovf        = 1'b0;

    unique case (state)
      S_FETCH: begin
        in_ready = 1'b1;
        if (in_valid) begin
          ir_n = in_data;
          unique case (opcode_e'(in_data[31:28]))
            OP_LDF, OP_LDL, OP_LDI, OP_LDR:     state_n = S_DATA;
            OP_OUTF, OP_OUTL:                   state_n = S_RDA;
            OP_OUTR:                            state_n = S_OUT;
            OP_FADD, OP_FSUB, OP_FMUL, OP_FDIV: state_n = S_RDA;
            OP_IADD, OP_ISUB, OP_MOVR:          state_n = S_EX1;
            default:                            state_n = S_FETCH;
          endcase
        end
      end

      S_DATA: begin
        in_ready = 1'b1;
        if (in_valid) begin
          if (op == OP_LDR) begin
            we1     = 1'b1;
            wa1     = fd[3:0];
            wd1     = in_data[22:0];
            state_n = S_FETCH;
          end else begin
            wbuf_n  = (op == OP_LDI) ? i2f : in_data;
            state_n = S_MWRITE;
          end
        end
      end

      S_MWRITE: begin
        w_valid = 1'b1;
        w_type  = (op == OP_LDL) ? T_LNS : T_FLOAT;
        if (w_ready) state_n = S_FETCH;
      end

      S_RDA: begin
        r_valid = 1'b1;
        if (r_ready) state_n = (op == OP_OUTF || op == OP_OUTL) ? S_OUT : S_RDB;
      end

      S_RDB: begin
        // operand A has arrived: R0/R1; request operand B
        we1 = 1'b1; wa1 = 4'd0; wd1 = low_part(r_data, is_fadd(op));
        we2 = 1'b1; wa2 = 4'd1; wd2 = high_part(r_data);
        r_valid = 1'b1;
        r_addr  = fb;
        if (r_ready) state_n = S_CAPB;
      end

      S_CAPB: begin
        we1 = 1'b1; wa1 = 4'd2; wd1 = low_part(r_data, is_fadd(op));
        we2 = 1'b1; wa2 = 4'd3; wd2 = high_part(r_data);
        state_n = S_EX1;
      end

      S_EX1: begin
        unique case (op)
          OP_IADD, OP_ISUB: begin
            ra1     = fb[3:0];
            alu1_op = (op == OP_IADD) ? ALU_ADD : ALU_SUB;
            we1     = 1'b1;
            wa1     = 4'd0;
            state_n = S_FETCH;
          end
          OP_MOVR: begin
            ra1     = fb[3:0];
            alu1_op = ALU_PASSB;
            we1     = 1'b1;
            wa1     = fd[3:0];
            state_n = S_FETCH;
          end
          OP_FMUL, OP_FDIV: begin
            alu1_op = (op == OP_FMUL) ? ALU_ADD : ALU_SUB;
            we1     = 1'b1;
            wa1     = 4'd0;
            carry_n = alu1_cout;
            za_n    = (r1[7:0] == LNS_ZERO_INT) && (r0 == '0);
            zb_n    = (rd2[7:0] == LNS_ZERO_INT) && (rd1 == '0);
            rsign_n = r1[22] ^ rd2[22];
            state_n = S_EX2;
          end
          default: begin  // FADD, FSUB
            alu1_op   = ALU_SUB;
            alu2_op   = ALU_SUB;
            ediff     = 10'(alu2_y[9:0]);
            swap_n    = (ediff < 0) || (ediff == 0 && alu1_cout);
            dsh_n     = (ediff > 10'sd23 || ediff < -10'sd23) ? 5'd31
                      : (ediff < 0) ? 5'(-ediff) : 5'(ediff);
            za_n      = (r1[7:0] == 8'd0);
            zb_n      = (rd2[7:0] == 8'd0);
            eff_sub_n = r1[22] ^ rd2[22] ^ (op == OP_FSUB);
            rsign_n   = swap_n ? (rd2[22] ^ (op == OP_FSUB)) : r1[22];
            state_n   = S_EX2;
          end
        endcase
      end

      S_EX2: begin
        if (op == OP_FMUL || op == OP_FDIV) begin
          alu2_op  = (op == OP_FMUL) ? ALU_ADC : ALU_SBB;
          alu2_cin = carry;
          ovf = (op == OP_FMUL) ? (r1[7] == rd2[7]) && (alu2_y[7] != r1[7])
                                : (r1[7] != rd2[7]) && (alu2_y[7] != r1[7]);
          we2 = 1'b1;
          wd2 = {rsign, 14'b0, alu2_y[7:0]};
          if (za || (op == OP_FMUL && zb) || (ovf && r1[7]) ||
              (!ovf && alu2_y[7:0] == LNS_ZERO_INT)) begin
            wd2 = {1'b0, 14'b0, LNS_ZERO_INT};  // zero
            we1 = 1'b1; wa1 = 4'd0; wd1 = '0;
          end else if ((op == OP_FDIV && zb) || ovf) begin
            wd2 = {rsign, 14'b0, 8'h7F};        // largest magnitude
            we1 = 1'b1; wa1 = 4'd0; wd1 = '1;
          end
          state_n = S_WB;
        end else begin  // FADD, FSUB: align and add/subtract
          if (za && !zb) begin
            alu1_op = ALU_PASSB;
            alu2_op = ALU_PASSB;
          end else if (zb) begin
            alu1_op = ALU_PASSA;
            alu2_op = ALU_PASSA;
          end else begin
            alu1_shamt = dsh;
            alu1_shsel = swap ? SH_A : SH_B;
            alu1_op    = !eff_sub ? ALU_ADD : (swap ? ALU_RSUB : ALU_SUB);
            alu2_op    = swap ? ALU_PASSB : ALU_PASSA;
          end
          carry_n = alu1_cout && !eff_sub && !za && !zb;
          rzero_n = za && zb;
          if (za && !zb) rsign_n = rd2[22] ^ (op == OP_FSUB);
          if (zb)        rsign_n = r1[22];
          we1 = 1'b1; wa1 = 4'd0;
          we2 = 1'b1; wa2 = 4'd1;
          state_n = S_EX3;
        end
      end

      S_EX3: begin  // normalise
        alu2_op = carry ? ALU_ADD : ALU_SUB;
        alu2_b  = carry ? 23'd1 : 23'(lz);
        if (carry) begin
          alu1_op    = ALU_SHR;
          alu1_shamt = 5'd1;
          alu1_cin   = 1'b1;
        end else begin
          alu1_op    = ALU_SHL;
          alu1_shamt = lz;
        end
        enew = 10'(alu2_y[9:0]);
        we1 = 1'b1; wa1 = 4'd0;
        we2 = 1'b1; wa2 = 4'd1;
        wd2 = {rsign, 14'b0, alu2_y[7:0]};
        if (rzero || (!carry && r0 == '0) || enew <= 0) begin
          wd1 = '0;
          wd2 = '0;
        end else if (enew >= 255) begin
          wd1 = '0;
          wd2 = {rsign, 14'b0, 8'hFF};
        end
        state_n = S_WB;
      end

      S_WB: begin
        w_valid = 1'b1;
        w_type  = is_fadd(op) ? T_FLOAT : T_LNS;
        w_data  = is_fadd(op) ? {r1[22], r1[7:0], r0[21:0], 1'b0}
                              : {r1[22], r1[7:0], r0};
        if (w_ready) state_n = S_FETCH;
      end

      S_OUT: begin
        out_valid = 1'b1;
        ra1       = fa[3:0];
        if (op == OP_OUTR) out_data = {9'b0, rd1};
        if (out_ready) state_n = S_FETCH;
      end

      default: state_n = S_FETCH;
    endcase
  end

  assign busy = (state != S_FETCH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_FETCH;
      ir      <= '0;
      wbuf    <= '0;
      carry   <= 1'b0;
      swap    <= 1'b0;
      eff_sub <= 1'b0;
      za      <= 1'b0;
      zb      <= 1'b0;
      rsign   <= 1'b0;
      rzero   <= 1'b0;
      dsh     <= '0;
    end else begin
      state   <= state_n;
      ir      <= ir_n;
      wbuf    <= wbuf_n;
      carry   <= carry_n;
      swap    <= swap_n;
      eff_sub <= eff_sub_n;
      za      <= za_n;
      zb      <= zb_n;
      rsign   <= rsign_n;
      rzero   <= rzero_n;
      dsh     <= dsh_n;
    end
  end

  // Operand data must be present whenever it is captured.
  capture_a: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_RDB || state == S_CAPB) |-> r_rvalid);
endmodule
