// fht_pb: processor block (PB), the node of the indirect hypercube.
//
// Holds one processor element (fht_pe), two dual-port data memories (DM0, DM1)
// and one coefficient table (fht_clut). During a stage one DM is the source:
// its two ports read the two PN pairs of one butterfly per cycle (local
// addresses {0,r} and {1,r}). The other DM is the destination: its port A
// stores the pair arriving on link 0 and its port B the pair on link 1, coming
// from the two blocks that feed this one (addresses {r,0} and {r,1}). The DMs
// swap roles every stage, so the results of one stage are the operands of the
// next without any memory conflict.
//
// Outside a transform port A of DM0 takes input samples (one half-word per
// cycle) and port A of the final DM delivers results.
//
// All addresses, enables and bank selections come from the control unit,
// identically for every block (SIMD); only the CLUT contents depend on PB_ID.
// Timing: read address in cycle t, PE operands in t+1, PE results (out0/out1,
// to the network) in t+6, written into the destination DM of the receiving
// block at the end of t+6. Unload data appears one cycle after ul_en.
//
// The block's make-up (one PE, two DMs alternating as source and destination,
// a private CLUT) follows the document; the use of the memory ports, with
// loading and unloading through port A, is this design's choice.
module fht_pb
  import fht_pkg::*;
#(
  parameter int unsigned N_POINTS = 1024,
  parameter int unsigned N_PB     = 8,
  parameter int unsigned PB_ID    = 0,
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned COEF_W   = 16,
  localparam int unsigned M       = $clog2(N_POINTS),
  localparam int unsigned N1      = $clog2(N_PB),
  localparam int unsigned N2      = M - 1 - N1,
  localparam int unsigned DEPTH   = 1 << N2,       // pairs per DM
  localparam int unsigned AW      = N2,
  localparam int unsigned SW      = $clog2(M + 1),
  localparam int unsigned HAW     = (N2 > 1) ? N2 - 1 : 1,
  localparam int unsigned PAIR_W  = 2 * DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // butterfly issue (cycle t)
  input  logic              rd_en,
  input  logic              rd_bank,     // source DM; the other one is written
  input  logic [AW-1:0]     rd_addr_a,
  input  logic [AW-1:0]     rd_addr_b,
  input  logic [SW-1:0]     stage,
  input  logic              clut_hi,
  input  logic [HAW-1:0]    clut_addr,
  input  logic [1:0]        shift,
  input  logic              rfft,        // real-valued FFT version
  // result write (cycle t+6)
  input  logic [AW-1:0]     wr_addr_a,
  input  logic [AW-1:0]     wr_addr_b,
  input  logic              link0_valid,
  input  logic [PAIR_W-1:0] link0_data,
  input  logic              link1_valid,
  input  logic [PAIR_W-1:0] link1_data,
  // results leaving this block
  output logic              out_valid,
  output logic [PAIR_W-1:0] out0_data,
  output logic [PAIR_W-1:0] out1_data,
  output logic              big1,
  output logic              big2,
  // sample load into DM0
  input  logic              ld_en,
  input  logic [1:0]        ld_we,
  input  logic [AW-1:0]     ld_addr,
  input  logic [PAIR_W-1:0] ld_data,
  // result unload
  input  logic              ul_en,
  input  logic              ul_bank,
  input  logic [AW-1:0]     ul_addr,
  output logic [PAIR_W-1:0] ul_data
);

  logic              m_a_en   [2];
  logic [1:0]        m_a_we   [2];
  logic [AW-1:0]     m_a_addr [2];
  logic [PAIR_W-1:0] m_a_wdata[2];
  logic [PAIR_W-1:0] m_a_rdata[2];
  logic              m_b_en   [2];
  logic [1:0]        m_b_we   [2];
  logic [AW-1:0]     m_b_addr [2];
  logic [PAIR_W-1:0] m_b_wdata[2];
  logic [PAIR_W-1:0] m_b_rdata[2];

  // port steering for the two DMs
  always_comb begin
    for (int x = 0; x < 2; x++) begin
      m_a_en[x] = 1'b0; m_a_we[x] = 2'b00; m_a_addr[x] = '0; m_a_wdata[x] = link0_data;
      m_b_en[x] = 1'b0; m_b_we[x] = 2'b00; m_b_addr[x] = '0; m_b_wdata[x] = link1_data;
      if (ld_en && x == 0) begin
        m_a_en[x] = 1'b1; m_a_we[x] = ld_we; m_a_addr[x] = ld_addr; m_a_wdata[x] = ld_data;
      end else if (rd_en && rd_bank == 1'(x)) begin
        m_a_en[x] = 1'b1; m_a_addr[x] = rd_addr_a;
      end else if (link0_valid && rd_bank != 1'(x)) begin
        m_a_en[x] = 1'b1; m_a_we[x] = 2'b11; m_a_addr[x] = wr_addr_a;
      end else if (ul_en && ul_bank == 1'(x)) begin
        m_a_en[x] = 1'b1; m_a_addr[x] = ul_addr;
      end
      if (rd_en && rd_bank == 1'(x)) begin
        m_b_en[x] = 1'b1; m_b_addr[x] = rd_addr_b;
      end else if (link1_valid && rd_bank != 1'(x)) begin
        m_b_en[x] = 1'b1; m_b_we[x] = 2'b11; m_b_addr[x] = wr_addr_b;
      end
    end
  end

  for (genvar x = 0; x < 2; x++) begin : g_dm
    fht_dual_port_ram #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_dm (
      .clk     (clk),
      .a_en    (m_a_en[x]),    .a_we(m_a_we[x]), .a_addr(m_a_addr[x]),
      .a_wdata (m_a_wdata[x]), .a_rdata(m_a_rdata[x]),
      .b_en    (m_b_en[x]),    .b_we(m_b_we[x]), .b_addr(m_b_addr[x]),
      .b_wdata (m_b_wdata[x]), .b_rdata(m_b_rdata[x])
    );
  end

  // coefficient table, read in step with the DM
  logic signed [COEF_W-1:0] coef_c, coef_s;
  pe_mode_e                 mode;
  logic                     swap;

  fht_clut #(.N_POINTS(N_POINTS), .N_PB(N_PB), .PB_ID(PB_ID), .COEF_W(COEF_W)) u_clut (
    .clk    (clk),
    .en     (rd_en),
    .rfft   (rfft),
    .stage  (stage),
    .hi     (clut_hi),
    .hi_addr(clut_addr),
    .cos_o  (coef_c),
    .sin_o  (coef_s),
    .mode_o (mode),
    .swap_o (swap)
  );

  logic       pe_valid, src_bank_q, ul_bank_q;
  logic [1:0] shift_q;

  always_ff @(posedge clk) begin
    if (!rst_n) pe_valid <= 1'b0;
    else        pe_valid <= rd_en;
    src_bank_q <= rd_bank;
    ul_bank_q  <= ul_bank;
    shift_q    <= shift;
  end

  pe_op_t                   op;
  logic [PAIR_W-1:0]        pa, pb;
  logic signed [DATA_W-1:0] o0p, o0n, o1p, o1n;

  always_comb begin
    op.mode  = mode;
    op.swap  = swap;
    op.shift = shift_q;
    pa = m_a_rdata[src_bank_q];
    pb = m_b_rdata[src_bank_q];
  end

  fht_pe #(.DATA_W(DATA_W), .COEF_W(COEF_W)) u_pe (
    .clk    (clk),
    .rst_n  (rst_n),
    .valid_i(pe_valid),
    .op_i   (op),
    .a_p_i  (pa[DATA_W-1:0]), .a_n_i(pa[PAIR_W-1:DATA_W]),
    .b_p_i  (pb[DATA_W-1:0]), .b_n_i(pb[PAIR_W-1:DATA_W]),
    .cos_i  (coef_c),
    .sin_i  (coef_s),
    .valid_o(out_valid),
    .o0_p_o (o0p), .o0_n_o(o0n), .o1_p_o(o1p), .o1_n_o(o1n),
    .big1_o (big1),
    .big2_o (big2)
  );

  assign out0_data = {o0n, o0p};
  assign out1_data = {o1n, o1p};
  assign ul_data   = m_a_rdata[ul_bank_q];

endmodule
