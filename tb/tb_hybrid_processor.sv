// End-to-end testbench for the hybrid FPS/LNS processor at its default size.
//
// Streams programs into the processor: floats, LNS numbers and integers are loaded,
// added, subtracted, multiplied and divided, and the results are read back in float
// and in LNS form. Every output word is compared with a reference computed here in
// real arithmetic (float add/sub to within 2^-20 of the larger operand; anything that
// passed through the piecewise-linear converters to within 1-2 %), integer results
// bit for bit. The number of execute clocks of every instruction is checked (1 for
// integer add/sub, 2 for multiply/divide, 3 for float add/sub), and the testbench
// counts how often each mechanism occurred: FLC and LFC conversions, reads stalled on
// an in-flight conversion, mantissa carry and left normalisation, LNS saturation,
// zero operands, integer-to-float loads, input and output back-pressure.
module tb_hybrid_processor;
  import fpslns_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, in_ready;
  logic [31:0] in_data = 0;
  logic        out_valid, out_ready = 0;
  logic [31:0] out_data;
  logic        busy;
  int checks = 0, failures = 0;

  hybrid_processor dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
                        .out_valid, .out_ready, .out_data, .busy);

  always #5 clk = ~clk;

  // ---------------- reference helpers ----------------
  function automatic real f2r(logic [31:0] f);
    real m;
    if (f[30:23] == 0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    m = m * $pow(2.0, real'(int'(f[30:23]) - 127));
    return f[31] ? -m : m;
  endfunction

  function automatic real l2r(logic [31:0] l);
    real e;
    if (l[30:23] == 8'h80 && l[22:0] == 0) return 0.0;
    e = real'(int'($signed(l[30:23]))) + real'(l[22:0]) / 8388608.0;
    return l[31] ? -$pow(2.0, e) : $pow(2.0, e);
  endfunction

  function automatic real absr(real x);
    return (x < 0) ? -x : x;
  endfunction

  function automatic logic [31:0] rnd_float(int emin, int emax);
    return {1'($urandom), 8'(emin + ($urandom % (emax - emin + 1))), 23'($urandom)};
  endfunction

  // ---------------- stimulus and expected results ----------------
  typedef enum {K_BITS, K_FLOAT, K_LNS} kind_e;
  typedef struct {
    kind_e       kind;
    logic [31:0] bits;
    real         value;
    real         tol;    // absolute tolerance
    string       what;
  } exp_t;

  logic [31:0] inq[$];
  exp_t        expq[$];

  function automatic logic [31:0] ins(opcode_e o, int d, int a, int b);
    return {o, 1'b0, 9'(d), 9'(a), 9'(b)};
  endfunction

  function automatic void push(logic [31:0] w);
    inq.push_back(w);
  endfunction

  function automatic void expect_bits(logic [31:0] b, string what);
    exp_t e;
    e.kind = K_BITS; e.bits = b; e.value = 0; e.tol = 0; e.what = what;
    expq.push_back(e);
  endfunction

  function automatic void expect_val(kind_e k, real v, real tol, string what);
    exp_t e;
    e.kind = k; e.bits = 0; e.value = v; e.tol = tol; e.what = what;
    expq.push_back(e);
  endfunction

  // drive the input stream
  // the word at the head of the queue is offered from each falling edge and
  // dropped from the queue at the rising edge that accepts it
  always @(posedge clk) if (in_valid && in_ready) void'(inq.pop_front());
  always @(negedge clk) begin
    in_valid <= rst_n && (inq.size() != 0);
    in_data  <= (inq.size() != 0) ? inq[0] : 32'd0;
  end

  // random output back-pressure
  int stall_pct = 30;
  always @(negedge clk) out_ready <= (($urandom % 100) >= stall_pct);

  // check the output stream
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      exp_t e;
      real  got;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %h", out_data);
      end else begin
        e = expq.pop_front();
        case (e.kind)
          K_BITS: if (out_data !== e.bits) begin
            failures++;
            $display("FAIL %s: got %h exp %h", e.what, out_data, e.bits);
          end
          K_FLOAT: begin
            got = f2r(out_data);
            if (absr(got - e.value) > e.tol) begin
              failures++;
              $display("FAIL %s: got %h (%g) exp %g", e.what, out_data, got, e.value);
            end
          end
          default: begin
            got = l2r(out_data);
            if (absr(got - e.value) > e.tol) begin
              failures++;
              $display("FAIL %s: got %h (%g) exp %g", e.what, out_data, got, e.value);
            end
          end
        endcase
      end
    end
  end

  // ---------------- execute-clock check and mechanism counters ----------------
  int n_flc, n_lfc, n_rd_stall, n_carry_norm, n_left_norm, n_lns_sat, n_zero_op;
  int n_i2f, n_in_full, n_out_stall, n_fadd, n_fmul, n_fdiv, n_iop;
  int ex_cycles;

  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_mmu.flc_ov) n_flc++;
      if (dut.u_mmu.lfc_ov) n_lfc++;
      if (dut.r_valid && !dut.r_ready) n_rd_stall++;
      if (dut.u_cu.state == dut.u_cu.S_EX3 && dut.u_cu.carry) n_carry_norm++;
      if (dut.u_cu.state == dut.u_cu.S_EX3 && !dut.u_cu.carry && dut.u_cu.lz != 0 &&
          dut.r0 != 0) n_left_norm++;
      if (dut.u_cu.state == dut.u_cu.S_EX2 && !dut.u_cu.is_fadd(dut.u_cu.op) &&
          (dut.u_cu.ovf || (dut.u_cu.op == OP_FDIV && dut.u_cu.zb))) n_lns_sat++;
      if (dut.u_cu.state == dut.u_cu.S_EX2 && (dut.u_cu.za || dut.u_cu.zb)) n_zero_op++;
      if (dut.u_cu.state == dut.u_cu.S_DATA && dut.u_cu.op == OP_LDI && dut.cu_in_valid) n_i2f++;
      if (in_valid && !in_ready) n_in_full++;
      if (out_valid && !out_ready) n_out_stall++;

      // execute clocks: from the first EX state to the state after the last one
      if (dut.u_cu.state inside {dut.u_cu.S_EX1, dut.u_cu.S_EX2, dut.u_cu.S_EX3}) ex_cycles++;
      else if (ex_cycles != 0) begin
        int want;
        case (dut.u_cu.op)
          OP_FADD, OP_FSUB: begin want = 3; n_fadd++; end
          OP_FMUL:          begin want = 2; n_fmul++; end
          OP_FDIV:          begin want = 2; n_fdiv++; end
          default:          begin want = 1; n_iop++;  end
        endcase
        checks++;
        if (ex_cycles != want) begin
          failures++;
          $display("FAIL op %0d took %0d execute clocks, expected %0d", dut.u_cu.op, ex_cycles, want);
        end
        ex_cycles = 0;
      end
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mechanism(string name, int n);
    checks++;
    $display("  %-28s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", name);
    end
  endtask

  // ---------------- programs ----------------
  initial begin
    logic [31:0] a, b, l;
    real ra, rb, rr, big;
    int ia, ib, acc;

    repeat (4) @(posedge clk);
    rst_n = 1;

    // float add / subtract on the float copies
    for (int t = 0; t < 60; t++) begin
      a = rnd_float(110, 140);
      b = (t % 5 == 0) ? {~a[31], a[30:23], 23'($urandom) & 23'h00FFFF | (a[22:0] & 23'h7F0000)}
                       : rnd_float(110, 140);
      push(ins(OP_LDF, 0, 0, 0)); push(a);
      push(ins(OP_LDF, 1, 0, 0)); push(b);
      push(ins((t % 2 == 1) ? OP_FSUB : OP_FADD, 2, 0, 1));
      push(ins(OP_OUTF, 0, 2, 0));
      ra = f2r(a); rb = f2r(b);
      rr = (t % 2 == 1) ? ra - rb : ra + rb;
      big = (absr(ra) > absr(rb)) ? absr(ra) : absr(rb);
      expect_val(K_FLOAT, rr, big * $pow(2.0, -20.0), (t % 2 == 1) ? "FSUB" : "FADD");
    end

    // multiply / divide on the LNS copies, results read in both forms
    for (int t = 0; t < 60; t++) begin
      a = rnd_float(100, 150);
      b = rnd_float(100, 150);
      push(ins(OP_LDF, 10, 0, 0)); push(a);
      push(ins(OP_LDF, 11, 0, 0)); push(b);
      push(ins((t % 2 == 1) ? OP_FDIV : OP_FMUL, 12, 10, 11));
      push(ins(OP_OUTL, 0, 12, 0));
      push(ins(OP_OUTF, 0, 12, 0));
      ra = f2r(a); rb = f2r(b);
      rr = (t % 2 == 1) ? ra / rb : ra * rb;
      expect_val(K_LNS, rr, absr(rr) * 0.01, (t % 2 == 1) ? "FDIV (LNS)" : "FMUL (LNS)");
      expect_val(K_FLOAT, rr, absr(rr) * 0.02, (t % 2 == 1) ? "FDIV (float)" : "FMUL (float)");
    end

    // LNS load, float read-back through the LFC
    for (int t = 0; t < 20; t++) begin
      l = {1'($urandom), 8'($signed(($urandom % 41)) - 20), 23'($urandom)};
      push(ins(OP_LDL, 20 + t, 0, 0)); push(l);
      push(ins(OP_OUTF, 0, 20 + t, 0));
      push(ins(OP_OUTL, 0, 20 + t, 0));
      rr = l2r(l);
      expect_val(K_FLOAT, rr, absr(rr) * 0.01, "LDL -> float");
      expect_bits(l, "LDL -> LNS");
    end

    // integer load through int2float
    for (int t = 0; t < 20; t++) begin
      ia = int'($urandom % 2000000) - 1000000;
      push(ins(OP_LDI, 40, 0, 0)); push(ia);
      push(ins(OP_OUTF, 0, 40, 0));
      expect_val(K_FLOAT, real'(ia), 0.0, "LDI");
    end

    // register integer operations
    acc = 0;
    for (int t = 0; t < 20; t++) begin
      ia = int'($urandom % 100000);
      ib = int'($urandom % 100000);
      push(ins(OP_LDR, 0, 0, 0)); push(ia);
      push(ins(OP_LDR, 5, 0, 0)); push(ib);
      push(ins((t % 2 == 1) ? OP_ISUB : OP_IADD, 0, 0, 5));
      push(ins(OP_MOVR, 7, 0, 0));
      push(ins(OP_OUTR, 0, 7, 0));
      acc = (t % 2 == 1) ? ia - ib : ia + ib;
      expect_bits({9'b0, 23'(acc)}, (t % 2 == 1) ? "ISUB" : "IADD");
    end

    // special values: zero operands, LNS overflow, division by zero, cancellation
    push(ins(OP_LDF, 50, 0, 0)); push(32'h0000_0000);
    push(ins(OP_LDF, 51, 0, 0)); push(32'h4049_0FDB);  // 3.14159
    push(ins(OP_FADD, 52, 50, 51)); push(ins(OP_OUTF, 0, 52, 0));
    expect_val(K_FLOAT, f2r(32'h4049_0FDB), 4.0 * $pow(2.0, -21.0), "0 + x");
    push(ins(OP_FSUB, 52, 50, 51)); push(ins(OP_OUTF, 0, 52, 0));
    expect_val(K_FLOAT, -f2r(32'h4049_0FDB), 4.0 * $pow(2.0, -21.0), "0 - x");
    push(ins(OP_FSUB, 52, 51, 51)); push(ins(OP_OUTF, 0, 52, 0));
    expect_bits(32'h0000_0000, "x - x");
    push(ins(OP_FMUL, 52, 50, 51)); push(ins(OP_OUTL, 0, 52, 0));
    expect_bits(LNS_ZERO, "0 * x (LNS)");
    push(ins(OP_FDIV, 52, 51, 50)); push(ins(OP_OUTL, 0, 52, 0));
    expect_bits({1'b0, 8'h7F, 23'h7FFFFF}, "x / 0 (LNS)");
    push(ins(OP_LDF, 53, 0, 0)); push(32'h7E00_0000);  // 2^125
    push(ins(OP_FMUL, 54, 53, 53)); push(ins(OP_OUTL, 0, 54, 0));
    expect_bits({1'b0, 8'h7F, 23'h7FFFFF}, "overflow (LNS)");
    push(ins(OP_LDF, 55, 0, 0)); push(32'h7F7F_0000);
    push(ins(OP_FADD, 56, 55, 55)); push(ins(OP_OUTF, 0, 56, 0));
    expect_bits(32'h7F80_0000, "float add overflow");

    // mantissa sum of exactly 2.0: 51 + 13 = 64
    push(ins(OP_LDF, 57, 0, 0)); push(32'h424C_0000);
    push(ins(OP_LDF, 58, 0, 0)); push(32'h4150_0000);
    push(ins(OP_FADD, 59, 57, 58)); push(ins(OP_OUTF, 0, 59, 0));
    expect_bits(32'h4280_0000, "51 + 13");

    // run with output back-pressure, then a phase that fills the input FIFO
    wait (inq.size() == 0 && expq.size() == 0);
    stall_pct = 95;
    for (int t = 0; t < 8; t++) begin
      push(ins(OP_LDR, 4, 0, 0)); push(t);
      push(ins(OP_OUTR, 0, 4, 0));
      expect_bits(32'(t), "OUTR under back-pressure");
    end
    wait (inq.size() == 0 && expq.size() == 0);
    repeat (10) @(posedge clk);

    $display("mechanisms:");
    mechanism("FLC conversions", n_flc);
    mechanism("LFC conversions", n_lfc);
    mechanism("read stalled on conversion", n_rd_stall);
    mechanism("mantissa carry normalise", n_carry_norm);
    mechanism("mantissa left normalise", n_left_norm);
    mechanism("LNS saturation", n_lns_sat);
    mechanism("zero operand", n_zero_op);
    mechanism("integer to float", n_i2f);
    mechanism("input FIFO full", n_in_full);
    mechanism("output back-pressure", n_out_stall);
    mechanism("float add/sub", n_fadd);
    mechanism("LNS multiply", n_fmul);
    mechanism("LNS divide", n_fdiv);
    mechanism("integer op", n_iop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
