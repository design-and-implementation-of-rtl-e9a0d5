// Workload testbench: runs two programs of the kinds the processor is aimed at on
// the full-size processor and checks the numbers that come out.
//
//  1. A radix-2 decimation-in-time FFT of integer samples, NPT = 128 points: the
//     largest power of two whose data (2 x 128 words) and twiddle factors (2 x 64
//     words) fit in the 512-word memory together with a few temporaries. Samples are
//     loaded with LDI (integer to float) in bit-reversed order, the twiddle factors
//     are loaded as floats, and each butterfly does its complex multiply with FMUL
//     on the LNS copies and its sums with FADD/FSUB on the float copies, in place.
//     All 2 x NPT outputs are compared with a DFT computed here in real arithmetic,
//     each to within 3 % of the largest output magnitude (the piecewise-linear
//     converters limit the precision); the largest error seen is printed.
//  2. One output-layer neuron of a 256-200-40 network at full fan-in: NIN = 200
//     integer inputs times float weights, accumulated (402 words); checked to within
//     2 % of the sum of the product magnitudes.
// The clocks of the FFT and the execute clocks spent in each form are reported.
module tb_workloads;
  import fpslns_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, in_ready;
  logic [31:0] in_data = 0;
  logic        out_valid, out_ready = 1;
  logic [31:0] out_data;
  logic        busy;
  int checks = 0, failures = 0;

  hybrid_processor dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
                        .out_valid, .out_ready, .out_data, .busy);
  always #5 clk = ~clk;

  function automatic real f2r(logic [31:0] f);
    real m;
    if (f[30:23] == 0) return 0.0;
    m = (1.0 + real'(f[22:0]) / 8388608.0) * $pow(2.0, real'(int'(f[30:23]) - 127));
    return f[31] ? -m : m;
  endfunction

  // real -> IEEE single, truncating the fraction
  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    int          e;
    d = $realtobits(r);
    if (d[62:52] == 0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), d[51:29]};
  endfunction

  function automatic real absr(real x);
    return (x < 0) ? -x : x;
  endfunction

  logic [31:0] inq[$];
  logic [31:0] outq[$];

  function automatic logic [31:0] ins(opcode_e o, int d, int a, int b);
    return {o, 1'b0, 9'(d), 9'(a), 9'(b)};
  endfunction

  // the word at the head of the queue is offered from each falling edge and
  // dropped from the queue at the rising edge that accepts it
  always @(posedge clk) if (in_valid && in_ready) void'(inq.pop_front());
  always @(negedge clk) begin
    in_valid <= rst_n && (inq.size() != 0);
    in_data  <= (inq.size() != 0) ? inq[0] : 32'd0;
  end
  always @(posedge clk) if (rst_n && out_valid && out_ready) outq.push_back(out_data);

  int ex_fp, ex_lns, n_clk;
  always @(posedge clk) if (rst_n) begin
    n_clk++;
    if (dut.u_cu.state inside {dut.u_cu.S_EX1, dut.u_cu.S_EX2, dut.u_cu.S_EX3}) begin
      if (dut.u_cu.op inside {OP_FMUL, OP_FDIV}) ex_lns++;
      else ex_fp++;
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory map of the FFT
  localparam int NPT = 128, LOGN = 7;
  localparam int XR = 0, XI = NPT, WR = 2 * NPT, WI = WR + NPT / 2;
  localparam int TR = WI + NPT / 2, TI = TR + 1, T1 = TR + 2, T2 = TR + 3, T3 = TR + 4, T4 = TR + 5;
  localparam real PI = 3.14159265358979;
  // memory map of the neuron: inputs, weights, sum, product
  localparam int NIN = 200, NX = 0, NW = NIN, NSUM = 2 * NIN, NPROD = 2 * NIN + 1;

  function automatic int bitrev(int n);
    int r = 0;
    for (int i = 0; i < LOGN; i++) r |= ((n >> i) & 1) << (LOGN - 1 - i);
    return r;
  endfunction

  task automatic butterfly(int a, int b, int k);
    inq.push_back(ins(OP_FMUL, T1, WR + k, XR + b));
    inq.push_back(ins(OP_FMUL, T2, WI + k, XI + b));
    inq.push_back(ins(OP_FSUB, TR, T1, T2));
    inq.push_back(ins(OP_FMUL, T3, WR + k, XI + b));
    inq.push_back(ins(OP_FMUL, T4, WI + k, XR + b));
    inq.push_back(ins(OP_FADD, TI, T3, T4));
    inq.push_back(ins(OP_FSUB, XR + b, XR + a, TR));
    inq.push_back(ins(OP_FSUB, XI + b, XI + a, TI));
    inq.push_back(ins(OP_FADD, XR + a, XR + a, TR));
    inq.push_back(ins(OP_FADD, XI + a, XI + a, TI));
  endtask

  initial begin
    int   x[NPT];
    real  er, ei, mx, gr, gi, err, worst;
    real  w[NIN], acc, mag;
    int   xi[NIN];
    int   t0;

    repeat (4) @(posedge clk);
    rst_n = 1;

    // ---------------- FFT ----------------
    for (int n = 0; n < NPT; n++) x[n] = int'($urandom % 201) - 100;
    for (int n = 0; n < NPT; n++) begin
      inq.push_back(ins(OP_LDI, XR + n, 0, 0)); inq.push_back(x[bitrev(n)]);
      inq.push_back(ins(OP_LDI, XI + n, 0, 0)); inq.push_back(0);
    end
    for (int k = 0; k < NPT / 2; k++) begin
      inq.push_back(ins(OP_LDF, WR + k, 0, 0)); inq.push_back(r2f($cos(2.0 * PI * k / NPT)));
      inq.push_back(ins(OP_LDF, WI + k, 0, 0)); inq.push_back(r2f(-$sin(2.0 * PI * k / NPT)));
    end
    wait (inq.size() == 0);
    t0 = n_clk;
    // stage with span s: butterflies (g+j, g+j+s) with twiddle W^(j*NPT/(2s))
    for (int sp = 1; sp < NPT; sp *= 2)
      for (int g = 0; g < NPT; g += 2 * sp)
        for (int j = 0; j < sp; j++) butterfly(g + j, g + j + sp, j * (NPT / (2 * sp)));
    for (int n = 0; n < NPT; n++) begin
      inq.push_back(ins(OP_OUTF, 0, XR + n, 0));
      inq.push_back(ins(OP_OUTF, 0, XI + n, 0));
    end
    wait (outq.size() == 2 * NPT);
    $display("FFT-%0d: %0d clocks, %0d float-form and %0d LNS-form execute clocks",
             NPT, n_clk - t0, ex_fp, ex_lns);
    mx = 0;
    for (int k = 0; k < NPT; k++) begin
      er = 0; ei = 0;
      for (int n = 0; n < NPT; n++) begin
        er += x[n] * $cos(2.0 * PI * ((k * n) % NPT) / NPT);
        ei -= x[n] * $sin(2.0 * PI * ((k * n) % NPT) / NPT);
      end
      if (absr(er) > mx) mx = absr(er);
      if (absr(ei) > mx) mx = absr(ei);
    end
    worst = 0;
    for (int k = 0; k < NPT; k++) begin
      er = 0; ei = 0;
      for (int n = 0; n < NPT; n++) begin
        er += x[n] * $cos(2.0 * PI * ((k * n) % NPT) / NPT);
        ei -= x[n] * $sin(2.0 * PI * ((k * n) % NPT) / NPT);
      end
      gr = f2r(outq.pop_front());
      gi = f2r(outq.pop_front());
      err = absr(gr - er) + absr(gi - ei);
      if (err > worst) worst = err;
      checks++;
      if (err > 0.03 * mx + 0.01) begin
        failures++;
        $display("FAIL FFT bin %0d: got %f %f exp %f %f", k, gr, gi, er, ei);
      end
    end
    $display("FFT-%0d: largest bin error %f of largest magnitude %f", NPT, worst, mx);

    // ---------------- neuron ----------------
    acc = 0; mag = 0;
    inq.push_back(ins(OP_LDF, NSUM, 0, 0)); inq.push_back(32'h0);   // sum = 0
    for (int i = 0; i < NIN; i++) begin
      xi[i] = int'($urandom % 256);
      w[i]  = (real'(int'($urandom % 2001)) - 1000.0) / 1000.0;
      inq.push_back(ins(OP_LDI, NX + i, 0, 0)); inq.push_back(xi[i]);
      inq.push_back(ins(OP_LDF, NW + i, 0, 0)); inq.push_back(r2f(w[i]));
      inq.push_back(ins(OP_FMUL, NPROD, NX + i, NW + i));
      inq.push_back(ins(OP_FADD, NSUM, NSUM, NPROD));
      acc += f2r(r2f(w[i])) * xi[i];
      mag += absr(f2r(r2f(w[i])) * xi[i]);
    end
    inq.push_back(ins(OP_OUTF, 0, NSUM, 0));
    wait (outq.size() == 1);
    gr = f2r(outq.pop_front());
    checks++;
    if (absr(gr - acc) > 0.02 * mag) begin
      failures++;
      $display("FAIL neuron: got %f exp %f", gr, acc);
    end
    $display("neuron-%0d: got %f, exact %f, sum of magnitudes %f", NIN, gr, acc, mag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
