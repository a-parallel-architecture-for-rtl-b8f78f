// fht_dual_port_ram: one data memory (DM) of a processor block.
//
// A true dual-port synchronous RAM. Each word holds one PN pair, two DATA_W-bit
// two's-complement values: the P part in the low half and the N part in the
// high half. Each port reads or writes one word per cycle; the write enable has
// one bit per half so that single samples can be loaded. Reads are registered:
// the word addressed in cycle t appears on rdata in cycle t+1. A read of a word
// written in the same cycle returns the old contents. Both ports must not write
// the same address in the same cycle (the address schedule of the processor
// never does; an assertion checks it).
//
// The document specifies dual-port memories; the word layout, byte-style half
// enables and read-during-write behaviour are this design's choices.
module fht_dual_port_ram #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned DEPTH  = 64,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                clk,
  // port A
  input  logic                a_en,
  input  logic [1:0]          a_we,     // [0] writes the P half, [1] the N half
  input  logic [AW-1:0]       a_addr,
  input  logic [2*DATA_W-1:0] a_wdata,
  output logic [2*DATA_W-1:0] a_rdata,
  // port B
  input  logic                b_en,
  input  logic [1:0]          b_we,
  input  logic [AW-1:0]       b_addr,
  input  logic [2*DATA_W-1:0] b_wdata,
  output logic [2*DATA_W-1:0] b_rdata
);

  logic [DATA_W-1:0] mem_p [DEPTH];
  logic [DATA_W-1:0] mem_n [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= {mem_n[a_addr], mem_p[a_addr]};
      if (a_we[0]) mem_p[a_addr] <= a_wdata[DATA_W-1:0];
      if (a_we[1]) mem_n[a_addr] <= a_wdata[2*DATA_W-1:DATA_W];
    end
    if (b_en) begin
      b_rdata <= {mem_n[b_addr], mem_p[b_addr]};
      if (b_we[0]) mem_p[b_addr] <= b_wdata[DATA_W-1:0];
      if (b_we[1]) mem_n[b_addr] <= b_wdata[2*DATA_W-1:DATA_W];
    end
  end

  // The two ports never write the same word in one cycle.
  a_no_write_collision: assert property (@(posedge clk)
    !(a_en && b_en && (a_we != 2'b00) && (b_we != 2'b00) && (a_addr == b_addr)));

endmodule
