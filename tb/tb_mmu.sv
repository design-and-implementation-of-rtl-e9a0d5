// Self-checking testbench for the memory management unit.
//
// Random writes (float or LNS form) and reads (either form) to a few addresses, issued
// back to back so that reads meet conversions still in flight, writes meet converter
// write-backs to the same memory, and new writes overtake older conversions of the
// same address. A model here remembers the last value and form written to each
// address: a read of that form must return it exactly, a read of the other form must
// be within 1 % of the same real number (computed here with real arithmetic). Read
// data must arrive one clock after the accepted request. Read stalls, write stalls
// and overtaken conversions are counted and must all occur.
module tb_mmu;
  import fpslns_pkg::*;
  logic clk = 0, rst_n = 0;
  logic        w_valid = 0, w_ready, r_valid = 0, r_ready, r_rvalid;
  var_type_e   w_type = T_FLOAT, r_type = T_FLOAT;
  logic [8:0]  w_addr = 0, r_addr = 0;
  logic [31:0] w_data = 0, r_data;
  int checks = 0, failures = 0;
  int n_rstall = 0, n_wstall = 0, n_overtake = 0, n_conv_reads = 0;

  mmu #(.DEPTH(512)) dut (.clk, .rst_n, .w_valid, .w_ready, .w_type, .w_addr, .w_data,
                          .r_valid, .r_ready, .r_type, .r_addr, .r_rvalid, .r_data);
  always #5 clk = ~clk;

  function automatic real f2r(logic [31:0] f);
    real m;
    if (f[30:23] == 0) return 0.0;
    m = (1.0 + real'(f[22:0]) / 8388608.0) * $pow(2.0, real'(int'(f[30:23]) - 127));
    return f[31] ? -m : m;
  endfunction

  function automatic real l2r(logic [31:0] l);
    real e;
    e = real'(int'($signed(l[30:23]))) + real'(l[22:0]) / 8388608.0;
    return l[31] ? -$pow(2.0, e) : $pow(2.0, e);
  endfunction

  logic [31:0] last_val [16];
  var_type_e   last_typ [16];
  logic        written  [16];
  int          last_wr_cyc [16];
  int          cycle = 0;

  // outstanding read
  logic        pend = 0;
  var_type_e   pend_t;
  logic [8:0]  pend_a;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (r_valid && !r_ready) n_rstall++;
      if (w_valid && !w_ready) n_wstall++;
      // response check for the read accepted in the previous clock
      checks++;
      if (r_rvalid != pend) begin
        failures++; $display("FAIL r_rvalid timing");
      end
      if (pend && r_rvalid) begin
        real want, got;
        checks++;
        if (pend_t == last_typ[pend_a]) begin
          if (r_data !== last_val[pend_a]) begin
            failures++;
            $display("FAIL same-form read addr %0d got %h exp %h", pend_a, r_data, last_val[pend_a]);
          end
        end else begin
          n_conv_reads++;
          want = (last_typ[pend_a] == T_FLOAT) ? f2r(last_val[pend_a]) : l2r(last_val[pend_a]);
          got  = (pend_t == T_FLOAT) ? f2r(r_data) : l2r(r_data);
          if ((got - want) > 0.01 * (want < 0 ? -want : want) ||
              (want - got) > 0.01 * (want < 0 ? -want : want)) begin
            failures++;
            $display("FAIL converted read addr %0d got %g exp %g", pend_a, got, want);
          end
        end
      end
      pend <= r_valid && r_ready;
      pend_t <= r_type;
      pend_a <= r_addr;
      if (w_valid && w_ready) begin
        if (written[w_addr] && cycle - last_wr_cyc[w_addr] <= 2) n_overtake++;
        last_val[w_addr[3:0]] = w_data;
        last_typ[w_addr[3:0]] = w_type;
        written[w_addr[3:0]]  = 1;
        last_wr_cyc[w_addr[3:0]] = cycle;
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin written[i] = 0; last_wr_cyc[i] = -100; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // initialise every address first
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      w_valid = 1; w_type = T_FLOAT; w_addr = 9'(i);
      w_data = {1'($urandom), 8'(100 + $urandom % 50), 23'($urandom)};
      @(posedge clk); while (!w_ready) @(posedge clk);
    end
    @(negedge clk); w_valid = 0;
    repeat (4) @(negedge clk);
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      if (!(w_valid && !w_ready)) begin
        w_valid = ($urandom % 3 == 0);
        w_type  = var_type_e'($urandom % 2);
        w_addr  = 9'($urandom % 16);
        w_data  = (w_type == T_FLOAT) ? {1'($urandom), 8'(100 + $urandom % 50), 23'($urandom)}
                                      : {1'($urandom), 8'($signed(($urandom % 41)) - 20), 23'($urandom)};
      end
      if (!(r_valid && !r_ready)) begin
        r_valid = ($urandom % 2 == 0);
        r_type  = var_type_e'($urandom % 2);
        r_addr  = (w_valid && $urandom % 2 == 0) ? w_addr : 9'($urandom % 16);
      end
      // never read and write the same address in the same clock (the central unit
      // does not), so the model's order is unambiguous
      if (r_valid && w_valid && r_addr == w_addr) r_valid = 0;
    end
    @(negedge clk); w_valid = 0; r_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (n_rstall == 0 || n_wstall == 0 || n_overtake == 0 || n_conv_reads == 0) begin
      failures++;
      $display("FAIL mechanism missing: rstall=%0d wstall=%0d overtake=%0d conv=%0d",
               n_rstall, n_wstall, n_overtake, n_conv_reads);
    end
    $display("read stalls %0d, write stalls %0d, overtaken conversions %0d, converted reads %0d",
             n_rstall, n_wstall, n_overtake, n_conv_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
