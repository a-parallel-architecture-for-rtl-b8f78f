// fht_control: control unit of the FHT processor array.
//
// Runs one transform in three phases:
//   LOAD    - accepts N real samples x[0..N-1] in natural order, one per cycle
//             (in_valid/in_ready), and stores sample n as a half of input pair
//             n mod N/2 at identifier rotr(n mod N/2); the pair's low identifier
//             bits select the processor block, the rest is the DM address.
//   COMPUTE - M = log2(N) stages. In each stage every block issues
//             B = 2^(N2-1) butterflies, one per cycle, then the array waits
//             PIPE_LEN = 7 cycles for the pipeline to drain. A stage therefore
//             takes B + 7 cycles and the transform M*(B + 7) cycles, the
//             document's latency L = n*(2^(n2-1) + P1).
//   UNLOAD  - reads the N results in natural order, one per cycle, from the DM
//             that the last stage wrote (out_* signals, one cycle after ul_en).
//             FHT: H[k]. Real-valued FFT: Re F(k) at k = 0..N/2 and Im F(k)
//             at N-k; out_neg marks results stored with the opposite sign.
//
// Transform version: in_rfft, sampled with the first sample of a block,
// selects the FHT (0) or the real-valued FFT (1) for that block; the two
// differ only in the k = 0 butterflies and the output placement.
//
// Address generation (identical for all blocks): butterfly r reads local
// addresses {0,r} and {1,r} of the source DM and, six cycles later, the
// receiving blocks write {r,0} and {r,1} of the destination DM. This is the
// one-bit left rotation of the pair identifiers between stages. The source and
// destination DMs swap every stage. The low part of every CLUT is addressed by
// the stage number, the high part (stage N1+2+h) by r mod 2^h.
//
// Block floating point: during each phase the unit ORs the "big" flags of all
// blocks (results of magnitude >= 2^(DATA_W-3) or >= 2^(DATA_W-2)). The next
// stage's operands are then shifted right by 1 or 2 bits and the shift is
// added to the block exponent: true result = output * 2^exponent.
//
// Some outputs are constant or copies of inputs by construction: ld_data
// carries the sample in both halves (ld_we picks one), and the low bit of
// wr_addr_a / wr_addr_b is always 0 / 1.
//
// Stage sequencing, address rotation, ping-pong memories, CLUT addressing and
// block floating point follow the document; the host-side load/unload
// interface, the exact scaling rule and all encodings are this design's.
module fht_control
  import fht_pkg::*;
#(
  parameter int unsigned N_POINTS = 1024,
  parameter int unsigned N_PB     = 8,
  parameter int unsigned DATA_W   = 16,
  localparam int unsigned M       = $clog2(N_POINTS),
  localparam int unsigned N1      = $clog2(N_PB),
  localparam int unsigned N2      = M - 1 - N1,
  localparam int unsigned B       = 1 << (N2 - 1),   // butterflies per block per stage
  localparam int unsigned AW      = N2,
  localparam int unsigned RW      = (N2 > 1) ? N2 - 1 : 1,
  localparam int unsigned SW      = $clog2(M + 1),
  localparam int unsigned HAW     = (N2 > 1) ? N2 - 1 : 1,
  localparam int unsigned PBW     = (N1 > 0) ? N1 : 1,
  localparam int unsigned IW      = M,
  localparam int unsigned EW      = $clog2(2 * M + 1),
  localparam int unsigned CW      = $clog2(B + PIPE_LEN + 1),
  localparam int unsigned PAIR_W  = 2 * DATA_W
) (
  input  logic               clk,
  input  logic               rst_n,
  // sample input
  input  logic               in_valid,
  input  logic [DATA_W-1:0]  in_data,
  input  logic               in_rfft,     // mode, sampled with the first sample
  output logic               in_ready,
  // broadcast to the processor blocks
  output logic               rd_en,
  output logic               rd_bank,
  output logic [AW-1:0]      rd_addr_a,
  output logic [AW-1:0]      rd_addr_b,
  output logic [SW-1:0]      stage,
  output logic               clut_hi,
  output logic [HAW-1:0]     clut_addr,
  output logic [1:0]         shift,
  output logic               rfft,
  output logic [AW-1:0]      wr_addr_a,
  output logic [AW-1:0]      wr_addr_b,
  output logic               ld_en,
  output logic [PBW-1:0]     ld_pb,
  output logic [1:0]         ld_we,
  output logic [AW-1:0]      ld_addr,
  output logic [PAIR_W-1:0]  ld_data,
  output logic               ul_en,
  output logic               ul_bank,
  output logic [AW-1:0]      ul_addr,
  // block-floating-point flags from the blocks
  input  logic [N_PB-1:0]    big1,
  input  logic [N_PB-1:0]    big2,
  // result stream bookkeeping (valid one cycle after ul_en)
  output logic               out_valid,
  output logic [IW-1:0]      out_index,
  output logic [PBW-1:0]     out_pb,
  output logic               out_half,
  output logic               out_neg,
  output logic [EW-1:0]      out_exp,
  output logic               busy,
  output logic               done
);

  typedef enum logic [1:0] {S_LOAD, S_COMPUTE, S_UNLOAD} state_e;

  state_e          state;
  logic [IW-1:0]   cnt;        // sample counter for load and unload
  logic [CW-1:0]   cyc;        // cycle within a stage
  logic [SW-1:0]   stg;        // current stage 1..M
  logic [EW-1:0]   exponent;
  logic            acc1, acc2; // OR of the big flags of the running phase
  logic [RW-1:0]   r;
  logic [RW-1:0]   r_dly [6];  // r of the butterflies now being written

  localparam logic [SW-1:0] LAST_STAGE = SW'(M);
  localparam logic [CW-1:0] STAGE_END  = CW'(B + PIPE_LEN - 1);

  // scaling for the next phase from the flags seen so far
  function automatic logic [1:0] pick_shift(logic f1, logic f2);
    return f2 ? 2'd2 : (f1 ? 2'd1 : 2'd0);
  endfunction

  logic f1_now, f2_now, in_big1, in_big2;
  always_comb begin
    in_big1 = (in_data[DATA_W-1 -: 3] != {3{in_data[DATA_W-1]}});
    in_big2 = (in_data[DATA_W-1 -: 2] != {2{in_data[DATA_W-1]}});
    f1_now  = acc1 || (|big1);
    f2_now  = acc2 || (|big2);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_LOAD;
      cnt      <= '0;
      cyc      <= '0;
      stg      <= SW'(1);
      exponent <= '0;
      shift    <= 2'd0;
      acc1     <= 1'b0;
      acc2     <= 1'b0;
      done     <= 1'b0;
      rfft     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_LOAD: if (in_valid) begin
          cnt  <= cnt + 1'b1;
          if (cnt == '0) rfft <= in_rfft;
          acc1 <= acc1 || in_big1;
          acc2 <= acc2 || in_big2;
          if (cnt == IW'(N_POINTS - 1)) begin
            state    <= S_COMPUTE;
            stg      <= SW'(1);
            cyc      <= '0;
            shift    <= pick_shift(acc1 || in_big1, acc2 || in_big2);
            exponent <= EW'(pick_shift(acc1 || in_big1, acc2 || in_big2));
            acc1     <= 1'b0;
            acc2     <= 1'b0;
          end
        end
        S_COMPUTE: begin
          acc1 <= f1_now;
          acc2 <= f2_now;
          if (cyc == STAGE_END) begin
            cyc  <= '0;
            acc1 <= 1'b0;
            acc2 <= 1'b0;
            if (stg == LAST_STAGE) begin
              state <= S_UNLOAD;
              cnt   <= '0;
            end else begin
              stg      <= stg + 1'b1;
              shift    <= pick_shift(f1_now, f2_now);
              exponent <= exponent + EW'(pick_shift(f1_now, f2_now));
            end
          end else begin
            cyc <= cyc + 1'b1;
          end
        end
        S_UNLOAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == IW'(N_POINTS - 1)) begin
            state    <= S_LOAD;
            cnt      <= '0;
            exponent <= '0;
            shift    <= 2'd0;
            done     <= 1'b1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // ---- compute-phase addresses ------------------------------------------
  assign r     = RW'(cyc);
  assign rd_en = (state == S_COMPUTE) && (cyc < CW'(B));
  assign stage = stg;
  assign rd_bank = ~stg[0];            // stage s reads DM (s-1) mod 2

  always_comb begin
    rd_addr_a = AW'(r);
    rd_addr_b = AW'(r) | AW'(1 << (AW - 1));
    wr_addr_a = AW'({r_dly[5], 1'b0});
    wr_addr_b = AW'({r_dly[5], 1'b1});
  end

  always_ff @(posedge clk) begin
    r_dly[0] <= r;
    for (int i = 1; i < 6; i++) r_dly[i] <= r_dly[i-1];
  end

  // CLUT: high stages are N1+3 .. M, stage N1+2+h uses 2^h entries
  always_comb begin
    int unsigned h;
    h         = 0;
    clut_hi   = 1'b0;
    clut_addr = '0;
    if (int'(stg) > int'(N1) + 2) begin
      h         = int'(stg) - int'(N1) - 2;
      clut_hi   = 1'b1;
      clut_addr = HAW'(32'(r) & ((32'd1 << h) - 1));
    end
  end

  // ---- load -----------------------------------------------------------------
  always_comb begin
    int unsigned np, pos;
    np      = 32'(cnt) & ((32'd1 << (M - 1)) - 1);
    pos     = in_pair_pos(np, M - 1);
    ld_en   = (state == S_LOAD) && in_valid;
    ld_pb   = PBW'(pos & ((32'd1 << N1) - 1));
    ld_addr = AW'(pos >> N1);
    ld_we   = cnt[IW-1] ? 2'b10 : 2'b01;
    ld_data = {in_data, in_data};
  end
  assign in_ready = (state == S_LOAD);

  // ---- unload ---------------------------------------------------------------
  logic            ul_half, ul_neg;
  logic [PBW-1:0]  ul_pb;
  always_comb begin
    int unsigned id;
    bit          nh, ng;
    id      = out_pair_id(32'(cnt), M, rfft, nh, ng);
    ul_half = nh;
    ul_neg  = ng;
    ul_pb   = PBW'(id & ((32'd1 << N1) - 1));
    ul_addr = AW'(id >> N1);
    ul_en   = (state == S_UNLOAD);
    ul_bank = 1'(M % 2);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= ul_en;
    out_index <= cnt;
    out_pb    <= ul_pb;
    out_half  <= ul_half;
    out_neg   <= ul_neg;
    out_exp   <= exponent;
  end

  assign busy    = (state != S_LOAD) || (cnt != '0);

endmodule
