// Self-checking testbench for register_file: random writes on both ports (port 2
// winning on a clash), random reads on both read ports and the R0/R1 outputs,
// compared with a shadow copy kept here; out-of-range addresses read as zero.
module tb_register_file;
  import fpslns_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0]  ra1, ra2, wa1, wa2;
  logic [22:0] rd1, rd2, wd1, wd2, r0, r1;
  logic        we1, we2;
  logic [22:0] shadow [10];
  int checks = 0, failures = 0;

  register_file dut (.clk, .rst_n, .ra1, .rd1, .ra2, .rd2, .we1, .wa1, .wd1,
                     .we2, .wa2, .wd2, .r0, .r1);
  always #5 clk = ~clk;

  function automatic logic [22:0] sh(logic [3:0] a);
    return (a < 10) ? shadow[a] : 23'd0;
  endfunction

  task automatic chk(logic [22:0] got, logic [22:0] exp_v, string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp_v);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {we1, we2, wa1, wa2, wd1, wd2, ra1, ra2} = '0;
    for (int i = 0; i < 10; i++) shadow[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ra1 = 4'($urandom % 12); ra2 = 4'($urandom % 12);
      #1;
      chk(rd1, sh(ra1), "rd1");
      chk(rd2, sh(ra2), "rd2");
      chk(r0, shadow[0], "r0");
      chk(r1, shadow[1], "r1");
      we1 = 1'($urandom); we2 = 1'($urandom);
      wa1 = 4'($urandom % 11); wa2 = (i % 9 == 0) ? wa1 : 4'($urandom % 11);
      wd1 = 23'($urandom); wd2 = 23'($urandom);
      @(posedge clk);
      if (we1 && wa1 < 10) shadow[wa1] = wd1;
      if (we2 && wa2 < 10) shadow[wa2] = wd2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
