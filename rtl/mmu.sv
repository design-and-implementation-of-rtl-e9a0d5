// Memory management unit: keeps the float and LNS copies of every variable in step.
//
// Write (w_valid/w_ready, w_type, w_addr, w_data): the value is stored in the memory
// of its own type and, in the same clock, sent to the FLC (float value) or the LFC
// (LNS value). Two clocks later the converted value comes back and is stored at the
// same address in the other memory. A conversion still in flight is cancelled when a
// newer write to the same address is accepted, so an old value can never overwrite a
// newer one.
// Read (r_valid/r_ready, r_type, r_addr): the word of the requested form comes out on
// r_data with r_rvalid one clock after the request is accepted. A read is held off
// (r_ready = 0) while a conversion into that form and address is still in flight: the
// conversion-latency overlap between the converters and the rest of the processor.
// A write is held off for one clock when a converted value is written into the same
// memory in that clock.
// The four tasks (store by type, convert, store the copy, read by type) follow the
// processor description; the handshake, the cancellation and the stall rules are this
// design's choices.
module mmu
  import fpslns_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          w_valid,
  output logic          w_ready,
  input  var_type_e     w_type,
  input  logic [AW-1:0] w_addr,
  input  logic [31:0]   w_data,
  input  logic          r_valid,
  output logic          r_ready,
  input  var_type_e     r_type,
  input  logic [AW-1:0] r_addr,
  output logic          r_rvalid,
  output logic [31:0]   r_data
);
  typedef struct packed {
    logic          live;
    var_type_e     dst;   // memory the converted value goes to
    logic [AW-1:0] addr;
  } pend_t;

  pend_t         pend [2];  // conversions in flight, stage 1 and stage 2
  logic          w_fire, r_fire;
  logic          wb_live;
  logic          flc_ov, lfc_ov;
  logic [31:0]   flc_od, lfc_od;
  logic [AW-1:0] flc_sb, lfc_sb;
  logic          wb_en;
  var_type_e     wb_type;
  logic [AW-1:0] wb_addr;
  logic [31:0]   wb_data;

  // Stage-2 entry writes back this clock unless a write to its address cancels it.
  assign wb_live = pend[1].live && !(w_fire && w_addr == pend[1].addr);

  always_comb begin
    w_ready = !(pend[1].live && pend[1].dst == w_type && w_addr != pend[1].addr);
    r_ready = 1'b1;
    for (int s = 0; s < 2; s++)
      if (pend[s].live && pend[s].dst == r_type && pend[s].addr == r_addr) r_ready = 1'b0;
  end

  assign w_fire = w_valid && w_ready;
  assign r_fire = r_valid && r_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend[0]  <= '0;
      pend[1]  <= '0;
      r_rvalid <= 1'b0;
    end else begin
      pend[0].live <= w_fire;
      pend[0].dst  <= (w_type == T_FLOAT) ? T_LNS : T_FLOAT;
      pend[0].addr <= w_addr;
      pend[1]      <= pend[0];
      if (w_fire && pend[0].addr == w_addr) pend[1].live <= 1'b0;
      r_rvalid <= r_fire;
    end
  end

  flc #(.SB_W(AW)) u_flc (
    .clk, .rst_n,
    .in_valid (w_fire && w_type == T_FLOAT), .in_data(w_data), .in_sb(w_addr),
    .out_valid(flc_ov), .out_data(flc_od), .out_sb(flc_sb)
  );

  lfc #(.SB_W(AW)) u_lfc (
    .clk, .rst_n,
    .in_valid (w_fire && w_type == T_LNS), .in_data(w_data), .in_sb(w_addr),
    .out_valid(lfc_ov), .out_data(lfc_od), .out_sb(lfc_sb)
  );

  always_comb begin
    wb_en   = wb_live && (flc_ov || lfc_ov);
    wb_type = flc_ov ? T_LNS : T_FLOAT;
    wb_addr = flc_ov ? flc_sb : lfc_sb;
    wb_data = flc_ov ? flc_od : lfc_od;
  end

  twin_memory #(.DEPTH(DEPTH), .AW(AW)) u_mem (
    .clk, .rst_n,
    .we0   (w_fire), .wtype0(w_type), .waddr0(w_addr), .wdata0(w_data),
    .we1   (wb_en),  .wtype1(wb_type), .waddr1(wb_addr), .wdata1(wb_data),
    .re    (r_fire), .rtype(r_type),  .raddr(r_addr), .rdata(r_data)
  );

  // The converters carry the address alongside the data; it must agree with the
  // tracking pipeline, and only one converter finishes per clock.
  conv_tag_a: assert property (@(posedge clk) disable iff (!rst_n)
    (flc_ov || lfc_ov) |-> (wb_addr == pend[1].addr && wb_type == pend[1].dst));
  one_conv_a: assert property (@(posedge clk) disable iff (!rst_n) !(flc_ov && lfc_ov));
endmodule
