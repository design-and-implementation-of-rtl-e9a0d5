// Self-checking testbench for twin_memory: random writes on both ports (never to the
// same memory in the same clock) and random reads of either form, checked against two
// shadow arrays kept here; the read data must appear one clock after the request, and
// a word written in one form must not disturb the other form at the same address.
module tb_twin_memory;
  localparam int D = 512;
  logic clk = 0, rst_n = 0;
  logic we0 = 0, we1 = 0, wtype0 = 0, wtype1 = 0, re = 0, rtype = 0;
  logic [8:0]  waddr0 = 0, waddr1 = 0, raddr = 0;
  logic [31:0] wdata0 = 0, wdata1 = 0, rdata;
  logic [31:0] fsh [D], lsh [D];
  int checks = 0, failures = 0;

  twin_memory #(.DEPTH(D)) dut (.clk, .rst_n, .we0, .wtype0, .waddr0, .wdata0,
    .we1, .wtype1, .waddr1, .wdata1, .re, .rtype, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] expv;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill both memories, float form on port 0 and LNS form on port 1 together
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we0 = 1; wtype0 = 0; waddr0 = 9'(a); wdata0 = $urandom;
      we1 = 1; wtype1 = 1; waddr1 = 9'(a); wdata1 = $urandom;
      fsh[a] = wdata0; lsh[a] = wdata1;
    end
    @(negedge clk); we0 = 0; we1 = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      we0 = 1'($urandom); wtype0 = 1'($urandom); waddr0 = 9'($urandom); wdata0 = $urandom;
      we1 = 1'($urandom); wtype1 = ~wtype0;       waddr1 = 9'($urandom); wdata1 = $urandom;
      if (i % 5 == 0) waddr1 = waddr0;
      re = 1; rtype = 1'($urandom); raddr = (i % 3 == 0) ? waddr0 : 9'($urandom);
      expv = rtype ? lsh[raddr] : fsh[raddr];   // read returns the old word
      @(posedge clk);
      if (we0) begin if (wtype0) lsh[waddr0] = wdata0; else fsh[waddr0] = wdata0; end
      if (we1) begin if (wtype1) lsh[waddr1] = wdata1; else fsh[waddr1] = wdata1; end
      #1;
      checks++;
      if (rdata !== expv) begin
        failures++;
        if (failures < 10) $display("FAIL read type %b addr %0d got %h exp %h", rtype, raddr, rdata, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
