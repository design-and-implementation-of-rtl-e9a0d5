// I/O unit: the buffer between the processor and the outside world.
//
// An input FIFO takes instruction and data words from the external stream and hands
// them to the central unit; an output FIFO takes the central unit's results and
// offers them to the external stream. Both sides use valid/ready. A word written on
// one side is visible on the other after 1 clock (the unit's 1-clock latency).
// The buffer role follows the processor description; the FIFO depth, the 32-bit
// word stream and the handshake are this design's choices.
module io_unit #(
  parameter int unsigned DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // external side
  input  logic        ext_in_valid,
  output logic        ext_in_ready,
  input  logic [31:0] ext_in_data,
  output logic        ext_out_valid,
  input  logic        ext_out_ready,
  output logic [31:0] ext_out_data,
  // central unit side
  output logic        cu_in_valid,
  input  logic        cu_in_ready,
  output logic [31:0] cu_in_data,
  input  logic        cu_out_valid,
  output logic        cu_out_ready,
  input  logic [31:0] cu_out_data
);
  sync_fifo #(.W(32), .DEPTH(DEPTH)) u_in (
    .clk, .rst_n,
    .in_valid (ext_in_valid), .in_ready (ext_in_ready), .in_data (ext_in_data),
    .out_valid(cu_in_valid),  .out_ready(cu_in_ready),  .out_data(cu_in_data)
  );

  sync_fifo #(.W(32), .DEPTH(DEPTH)) u_out (
    .clk, .rst_n,
    .in_valid (cu_out_valid),  .in_ready (cu_out_ready),  .in_data (cu_out_data),
    .out_valid(ext_out_valid), .out_ready(ext_out_ready), .out_data(ext_out_data)
  );
endmodule
