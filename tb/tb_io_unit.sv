// Self-checking testbench for io_unit: random words pushed through the input path
// and the output path with random valid/ready on both ends; order and values are
// compared with queues kept here, the 1-clock pass-through latency is checked on an
// empty buffer, and both buffers are driven full.
module tb_io_unit;
  logic clk = 0, rst_n = 0;
  logic        ext_in_valid = 0, ext_in_ready, ext_out_valid, ext_out_ready = 0;
  logic [31:0] ext_in_data = 0, ext_out_data, cu_in_data, cu_out_data = 0;
  logic        cu_in_valid, cu_in_ready = 0, cu_out_valid = 0, cu_out_ready;
  logic [31:0] q_in[$], q_out[$];
  int checks = 0, failures = 0, full_in = 0, full_out = 0;

  io_unit #(.DEPTH(8)) dut (.clk, .rst_n, .ext_in_valid, .ext_in_ready, .ext_in_data,
    .ext_out_valid, .ext_out_ready, .ext_out_data, .cu_in_valid, .cu_in_ready, .cu_in_data,
    .cu_out_valid, .cu_out_ready, .cu_out_data);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (ext_in_valid && ext_in_ready) q_in.push_back(ext_in_data);
    if (cu_out_valid && cu_out_ready) q_out.push_back(cu_out_data);
    if (ext_in_valid && !ext_in_ready) full_in++;
    if (cu_out_valid && !cu_out_ready) full_out++;
    if (cu_in_valid && cu_in_ready) begin
      checks++;
      if (q_in.size() == 0 || cu_in_data !== q_in[0]) begin
        failures++; $display("FAIL input path %h", cu_in_data);
      end
      if (q_in.size() != 0) void'(q_in.pop_front());
    end
    if (ext_out_valid && ext_out_ready) begin
      checks++;
      if (q_out.size() == 0 || ext_out_data !== q_out[0]) begin
        failures++; $display("FAIL output path %h", ext_out_data);
      end
      if (q_out.size() != 0) void'(q_out.pop_front());
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency on an empty buffer: pushed at one edge, visible after it
    @(negedge clk); ext_in_valid = 1; ext_in_data = 32'hCAFE0001;
    @(negedge clk); ext_in_valid = 0;
    checks++;
    if (!cu_in_valid || cu_in_data !== 32'hCAFE0001) begin
      failures++; $display("FAIL 1-clock latency");
    end
    cu_in_ready = 1; @(negedge clk); cu_in_ready = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ext_in_valid  = (i < 1500) ? 1'($urandom) : ($urandom % 4 == 0);
      ext_in_data   = $urandom;
      cu_in_ready   = (i < 1500) ? ($urandom % 4 == 0) : 1'($urandom);
      cu_out_valid  = (i < 1500) ? 1'($urandom) : ($urandom % 4 == 0);
      cu_out_data   = $urandom;
      ext_out_ready = (i < 1500) ? ($urandom % 4 == 0) : 1'($urandom);
    end
    @(negedge clk); ext_in_valid = 0; cu_out_valid = 0; cu_in_ready = 1; ext_out_ready = 1;
    repeat (20) @(negedge clk);
    checks++;
    if (q_in.size() != 0 || q_out.size() != 0 || full_in == 0 || full_out == 0) begin
      failures++; $display("FAIL leftover %0d/%0d or never full %0d/%0d", q_in.size(), q_out.size(), full_in, full_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
