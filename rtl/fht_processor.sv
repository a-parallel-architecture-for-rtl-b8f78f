// fht_processor: parallel radix-2 fast Hartley transform processor (top).
//
// An N_POINTS-point discrete Hartley transform
//     H[k] = sum_n x[n] * (cos(2*pi*n*k/N) + sin(2*pi*n*k/N))
// of real samples, or in the real-valued FFT version the spectrum
//     F(k) = sum x[n] * exp(-2*pi*i*n*k/N),
// packed as Re F(k) at index k (0..N/2) and Im F(k) at index N-k. Both are
// computed by N_PB processor blocks (fht_pb) working in SIMD
// under one control unit (fht_control). The blocks are wired as an indirect
// binary hypercube: block p sends its first result pair to block (2p) mod N_PB
// and its second to block (2p+1) mod N_PB, so block q receives on link 0 from
// block q/2 and on link 1 from block q/2 + N_PB/2. All M = log2(N) stages of
// the transform run on this single physical stage; the data flow is the
// perfect shuffle of the pairs' identifiers.
//
// The two versions share the data flow and the twiddles and differ only in the
// k = 0 butterflies and in where the results are stored; in_rfft, sampled
// with the first sample of a block, selects the version for that block.
//
// Interface: after reset, N samples are accepted in natural order on
// in_valid/in_data while in_ready is high. The transform then runs for
// M*(2^(N2-1) + 7) cycles (N2 = M-1-log2(N_PB)), after which the N results
// stream out in natural order of their index, one per cycle, on out_valid/out_index/
// out_data, with no back-pressure. out_data is DATA_W-bit two's complement and
// the true value is out_data * 2^out_exp (block floating point). done pulses
// after the last result; the next block of samples may then be loaded.
//
// The architecture (blocks, hypercube wiring, memories, CLUTs, pipeline
// length) and both transform versions follow the document; the sizes (1024
// points, 8 blocks, 16-bit data and coefficients), the block-floating-point
// rule and the host interface are this design's choices.
module fht_processor
  import fht_pkg::*;
#(
  parameter int unsigned N_POINTS = 1024,
  parameter int unsigned N_PB     = 8,
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned COEF_W   = 16,
  localparam int unsigned M       = $clog2(N_POINTS),
  localparam int unsigned N1      = $clog2(N_PB),
  localparam int unsigned N2      = M - 1 - N1,
  localparam int unsigned AW      = N2,
  localparam int unsigned SW      = $clog2(M + 1),
  localparam int unsigned HAW     = (N2 > 1) ? N2 - 1 : 1,
  localparam int unsigned PBW     = (N1 > 0) ? N1 : 1,
  localparam int unsigned EW      = $clog2(2 * M + 1),
  localparam int unsigned PAIR_W  = 2 * DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data,
  input  logic              in_rfft,
  output logic              in_ready,
  output logic              out_valid,
  output logic [M-1:0]      out_index,
  output logic [DATA_W-1:0] out_data,
  output logic [EW-1:0]     out_exp,
  output logic              busy,
  output logic              done
);

  // supported configurations: at least two blocks, at least one butterfly
  // per block and stage
  if (N_PB < 2 || (1 << N1) != N_PB || (1 << M) != N_POINTS || N2 < 1) begin : g_bad_cfg
    $error("fht_processor: N_POINTS and N_PB must be powers of two, 2 <= N_PB <= N_POINTS/4");
  end

  // broadcast control
  logic              rd_en, rd_bank, clut_hi, ld_en, ul_en, ul_bank;
  logic [AW-1:0]     rd_addr_a, rd_addr_b, wr_addr_a, wr_addr_b, ld_addr, ul_addr;
  logic [SW-1:0]     stage;
  logic [HAW-1:0]    clut_addr;
  logic [1:0]        shift, ld_we;
  logic              rfft, out_neg;
  logic [PBW-1:0]    ld_pb, out_pb;
  logic [PAIR_W-1:0] ld_data;
  logic              out_half;
  logic [N_PB-1:0]   big1, big2;

  fht_control #(.N_POINTS(N_POINTS), .N_PB(N_PB), .DATA_W(DATA_W)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_data, .in_rfft, .in_ready,
    .rd_en, .rd_bank, .rd_addr_a, .rd_addr_b, .stage, .clut_hi, .clut_addr, .shift, .rfft,
    .wr_addr_a, .wr_addr_b,
    .ld_en, .ld_pb, .ld_we, .ld_addr, .ld_data,
    .ul_en, .ul_bank, .ul_addr,
    .big1, .big2,
    .out_valid, .out_index, .out_pb, .out_half, .out_neg, .out_exp, .busy, .done
  );

  // per-block result links
  logic              pb_valid [N_PB];
  logic [PAIR_W-1:0] pb_out0  [N_PB];
  logic [PAIR_W-1:0] pb_out1  [N_PB];
  logic [PAIR_W-1:0] pb_ul    [N_PB];

  for (genvar q = 0; q < N_PB; q++) begin : g_pb
    // indirect hypercube: sources of block q and which of their outputs
    localparam int unsigned SRC0 = q / 2;
    localparam int unsigned SRC1 = q / 2 + N_PB / 2;
    localparam bit          OUTC = (q % 2) == 1;

    fht_pb #(
      .N_POINTS(N_POINTS), .N_PB(N_PB), .PB_ID(q), .DATA_W(DATA_W), .COEF_W(COEF_W)
    ) u_pb (
      .clk, .rst_n,
      .rd_en, .rd_bank, .rd_addr_a, .rd_addr_b, .stage, .clut_hi, .clut_addr, .shift, .rfft,
      .wr_addr_a, .wr_addr_b,
      .link0_valid(pb_valid[SRC0]),
      .link0_data (OUTC ? pb_out1[SRC0] : pb_out0[SRC0]),
      .link1_valid(pb_valid[SRC1]),
      .link1_data (OUTC ? pb_out1[SRC1] : pb_out0[SRC1]),
      .out_valid  (pb_valid[q]),
      .out0_data  (pb_out0[q]),
      .out1_data  (pb_out1[q]),
      .big1       (big1[q]),
      .big2       (big2[q]),
      .ld_en      (ld_en && ld_pb == PBW'(q)),
      .ld_we, .ld_addr, .ld_data,
      .ul_en, .ul_bank, .ul_addr,
      .ul_data    (pb_ul[q])
    );
  end

  // result selection: block and half of the pair read in the previous cycle
  logic [PAIR_W-1:0] ul_word;
  logic [DATA_W-1:0] ul_val;
  always_comb begin
    ul_word  = pb_ul[out_pb];
    ul_val   = out_half ? ul_word[PAIR_W-1:DATA_W] : ul_word[DATA_W-1:0];
    out_data = out_neg ? -ul_val : ul_val;
  end

endmodule
