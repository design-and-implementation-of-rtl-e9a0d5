// Self-checking testbench for the LFC (LNS -> float).
// A reference model built here from real arithmetic (2.0**x) recomputes the 128-line
// tables and the expected LNS word for each input; the output must match bit for bit,
// must lie within 2^-7 of the true 2^x - 1, and must appear exactly 2 clocks after the
// input. The LNS zero code and integers below the float range must give zero.
module tb_lfc;
  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0;
  logic [31:0] in_data = 0;
  logic [15:0] in_sb = 0;
  logic        out_valid;
  logic [31:0] out_data;
  logic [15:0] out_sb;
  int checks = 0, failures = 0;
  int cycle = 0;

  lfc #(.SB_W(16)) dut (.clk, .rst_n, .in_valid, .in_data, .in_sb, .out_valid, .out_data, .out_sb);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [31:0] ref_flt(logic [31:0] l);
    int i, sh, sl, s, n;
    real r0, r1;
    n = int'($signed(l[30:23]));
    if (n < -126) return {l[31], 31'd0};
    i  = int'(l[22:16]);
    r0 = 2.0 ** (i / 128.0) - 1.0;
    r1 = 2.0 ** ((i + 1) / 128.0) - 1.0;
    sh = int'($floor(r0 * 128.0 + 0.5));
    sl = int'($floor((r1 - r0) * 8192.0 + 0.5));
    if (sh > 127) sh = 127;
    s = sh * 65536 + ((sl * int'(l[15:0])) >>> 6);
    if (s > 32'h7FFFFF) s = 32'h7FFFFF;
    return {l[31], 8'(n + 127), 23'(s)};
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
      exp_l = ref_flt(f);
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
      if ($signed(f[30:23]) >= -126) begin
        tru = 2.0 ** (real'(f[22:0]) / 8388608.0) - 1.0;
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
    send(32'h0000_0000);  // 2^0 = 1.0
    send(32'h0080_0000);  // 2^1 = 2.0
    send(32'hBFC0_0000);  // -2^-0.5
    send(32'h007F_FFFF);  // just below 2^1
    send(32'h4000_0000);  // LNS zero code
    send(32'hC0FF_FFFF);  // integer -127: below the float range
    send(32'h3F00_0000);  // integer 126, fraction 0
    send(32'h3FFF_FFFF);  // largest LNS value
    send(32'h4080_0000);  // integer -127
    for (int i = 0; i < 128; i++) send({1'b0, 8'd3, 7'(i), 16'($urandom)});
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
