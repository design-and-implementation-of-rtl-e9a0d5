// Twin memory: two 32-bit memories behind one address space, one holding every
// variable in float form and the other the same variable in LNS form at the same
// address. The type bit, the MSB of the full address {type, addr}, picks the memory.
//
// Two write ports, each taking {type, addr}: port 0 for values coming from the
// central unit, port 1 for values coming back from the converters. The two must not
// write the same memory in the same clock (asserted). One read port with a 1-clock
// (registered) read. DEPTH words per memory; the default 512 gives 2 x 2 KB = 4 KB.
// The twin organisation, the shared address and the type bit follow the processor
// description; the depth (the description allows 2 to 16 KB), the port set and the
// read timing are this design's choices.
module twin_memory #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we0,
  input  logic          wtype0,
  input  logic [AW-1:0] waddr0,
  input  logic [31:0]   wdata0,
  input  logic          we1,
  input  logic          wtype1,
  input  logic [AW-1:0] waddr1,
  input  logic [31:0]   wdata1,
  input  logic          re,
  input  logic          rtype,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata
);
  logic [31:0] fmem [DEPTH];  // float form
  logic [31:0] lmem [DEPTH];  // LNS form

  always_ff @(posedge clk) begin
    if (we0 && !wtype0) fmem[waddr0] <= wdata0;
    if (we1 && !wtype1) fmem[waddr1] <= wdata1;
    if (we0 &&  wtype0) lmem[waddr0] <= wdata0;
    if (we1 &&  wtype1) lmem[waddr1] <= wdata1;
    if (re) rdata <= rtype ? lmem[raddr] : fmem[raddr];
  end

  one_writer_a: assert property (@(posedge clk) disable iff (!rst_n)
    !(we0 && we1 && (wtype0 == wtype1)));
endmodule
