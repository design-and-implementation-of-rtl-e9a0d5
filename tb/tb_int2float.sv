// Self-checking testbench for int2float: corner integers and random ones of every
// magnitude. The expected float is built here by a bit-serial search for the leading
// one and truncation of the bits below the 24-bit mantissa.
module tb_int2float;
  logic [31:0] i, f;
  int checks = 0, failures = 0;

  int2float dut (.i, .f);

  function automatic logic [31:0] ref_f(logic [31:0] v);
    logic        s;
    logic [63:0] m;
    int          e;
    s = v[31];
    m = s ? 64'(-$signed(v)) : 64'(v);
    if (m == 0) return 32'd0;
    e = 0;
    while ((m >> e) > 1) e++;
    // mantissa fraction: the 23 bits below the leading one, truncated
    return {s, 8'(127 + e), 23'(((m << 23) >> e) & 64'h7FFFFF)};
  endfunction

  task automatic try(logic [31:0] v);
    i = v; #1;
    checks++;
    if (f !== ref_f(v)) begin
      failures++;
      if (failures < 10) $display("FAIL i=%0d f=%h exp=%h", $signed(v), f, ref_f(v));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(0); try(1); try(-1); try(2); try(3); try(32'h7FFFFFFF); try(32'h80000000);
    try(16777217); try(-16777217);
    for (int k = 0; k < 3000; k++) try($urandom >> ($urandom % 32));
    for (int k = 0; k < 1000; k++) try(-($urandom >> ($urandom % 32)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
