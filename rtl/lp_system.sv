// List processor with its memory.
//
// Connects the linked-list summing processor to a single-ported 2**AW x DW
// memory with asynchronous read. The memory's one address port is shared: while
// load_en is high it takes load_addr and writes load_data on the clock edge
// (used to place a list in memory before START); otherwise it carries the
// processor's address. Loading while the processor runs corrupts its reads;
// the assertion below reports it. Ports: START in, DONE and R out, as for the
// processor; the load port is this design's addition.
module lp_system #(
  parameter int unsigned AW    = 8,
  parameter int unsigned DW    = 8,
  parameter int unsigned SUM_W = 8,
  parameter int unsigned ARCH  = 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  output logic             done,
  output logic [SUM_W-1:0] r,
  input  logic             load_en,
  input  logic [AW-1:0]    load_addr,
  input  logic [DW-1:0]    load_data
);

  logic [AW-1:0] lp_a, mem_a;
  logic [DW-1:0] mem_d;
  logic          busy;

  list_processor #(.AW(AW), .DW(DW), .SUM_W(SUM_W), .ARCH(ARCH)) u_lp (
    .clk, .rst, .start, .mem_a(lp_a), .mem_d, .done, .busy, .r
  );

  assign mem_a = load_en ? load_addr : lp_a;

  lp_memory #(.AW(AW), .DW(DW)) u_mem (
    .clk, .a(mem_a), .d(mem_d), .we(load_en), .wd(load_data)
  );

  // Loading is only allowed while the processor is idle or done.
  a_load_idle: assert property (@(posedge clk) disable iff (rst)
    load_en |-> !busy && !start);

endmodule
