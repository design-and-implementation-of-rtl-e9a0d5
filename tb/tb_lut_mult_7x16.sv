// Self-checking testbench for lut_mult_7x16: corner operands plus random pairs,
// each product compared with the integer product worked out in the testbench.
module tb_lut_mult_7x16;
  logic [6:0]  a;
  logic [15:0] b;
  logic [22:0] p;
  int checks = 0, failures = 0;

  lut_mult_7x16 dut (.a, .b, .p);

  task automatic try(input logic [6:0] ta, input logic [15:0] tb);
    logic [22:0] exp_p;
    a = ta; b = tb;
    #1;
    exp_p = 23'(int'(ta) * int'(tb));
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d p=%0d exp=%0d", ta, tb, p, exp_p);
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
    try(0, 0); try(127, 16'hFFFF); try(1, 16'hFFFF); try(127, 1);
    for (int i = 0; i < 16; i++) try(7'(1 << (i % 7)), 16'(1 << i));
    for (int i = 0; i < 4000; i++) try(7'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
