// Self-checking testbench for the FLC (float -> LNS).
// A reference model built here from real arithmetic ($ln) recomputes the 128-line
// tables and the expected LNS word for each input; the output must match bit for bit,
// must lie within 2^-7 of the true log2, and must appear exactly 2 clocks after the
// input. Zero, subnormal and infinity inputs are checked against the special codes.
module tb_flc;
  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0;
  logic [31:0] in_data = 0;
  logic [15:0] in_sb = 0;
  logic        out_valid;
  logic [31:0] out_data;
  logic [15:0] out_sb;
  int checks = 0, failures = 0;
  int cycle = 0;

  flc #(.SB_W(16)) dut (.clk, .rst_n, .in_valid, .in_data, .in_sb, .out_valid, .out_data, .out_sb);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic real log2r(real x);
    return $ln(x) / $ln(2.0);
  endfunction

  function automatic logic [31:0] ref_lns(logic [31:0] f);
    int i, sh, sl, s;
    real r0, r1;
    logic [7:0] e;
    e = f[30:23];
    if (e == 0)   return {f[31], 8'h80, 23'd0};
    if (e == 255) return {f[31], 8'h7F, 23'h7FFFFF};
    i  = int'(f[22:16]);
    r0 = log2r(1.0 + i / 128.0);
    r1 = log2r(1.0 + (i + 1) / 128.0);
    sh = int'($floor(r0 * 128.0 + 0.5));
    sl = int'($floor((r1 - r0) * 8192.0 + 0.5));
    if (sh > 127) sh = 127;
    s = sh * 65536 + ((sl * int'(f[15:0])) >>> 6);
    if (s > 32'h7FFFFF) s = 32'h7FFFFF;
    return {f[31], 8'(int'(e) - 127), 23'(s)};
  endfunction

  logic [31:0] q_data[$];
  int          q_cyc[$];

  // Drive one input per clock, record what and when.
  task automatic send(input logic [31:0] f);
    @(negedge clk);
    in_valid = 1; in_data = f; in_sb = 16'(checks + q_data.size());
    q_data.push_back(f);
    q_cyc.push_back(cycle);
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [31:0] f, exp_l;
      int c;
      real tru, got;
      f = q_data.pop_front();
      c = q_cyc.pop_front();
      exp_l = ref_lns(f);
      checks++;
      if (out_data !== exp_l) begin
        failures++;
        if (failures < 10) $display("FAIL in=%h out=%h exp=%h", f, out_data, exp_l);
      end
      checks++;
      if (cycle - c != 2) begin
        failures++;
        $display("FAIL latency %0d", cycle - c);
      end
      if (f[30:23] != 0 && f[30:23] != 255) begin
        tru = log2r(1.0 + real'(f[22:0]) / 8388608.0);
        got = real'(out_data[22:0]) / 8388608.0;
        checks++;
        if (got - tru > 1.0/128 || tru - got > 1.0/128) begin
          failures++;
          $display("FAIL accuracy in=%h got=%f true=%f", f, got, tru);
        end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(32'h3F80_0000);  // 1.0
    send(32'h4000_0000);  // 2.0
    send(32'hBFC0_0000);  // -1.5
    send(32'h3FFF_FFFF);  // just below 2
    send(32'h0000_0000);  // zero
    send(32'h0000_1234);  // subnormal
    send(32'h7F80_0000);  // infinity
    send(32'h0080_0000);  // smallest normal
    send(32'h7F7F_FFFF);  // largest normal
    for (int i = 0; i < 128; i++) send({1'b0, 8'd127, 7'(i), 16'($urandom)});
    for (int i = 0; i < 2000; i++) begin
      send($urandom);
      if ($urandom % 4 == 0) begin
        @(negedge clk) in_valid = 0;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q_data.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q_data.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
