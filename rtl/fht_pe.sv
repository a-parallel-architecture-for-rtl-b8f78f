// fht_pe: processor element (PE) -- the double FHT butterfly unit.
//
// Takes two PN pairs a = (aP, aN) and b = (bP, bN) per cycle and returns two
// PN pairs. With c = cos(2*pi*k/L), s = sin(2*pi*k/L):
//   type B (0 < k < L/4): t1 = c*bP + s*bN, t2 = c*bN - s*bP
//        out0 = (aP + t1, aN + t2)   -> outputs k and L-k
//        out1 = (aN - t2, aP - t1)   -> outputs L/2-k and L/2+k
//   type A (k = 0):  out0 = (aP + bP, aP - bP)   -> outputs 0 and L/2
//                    out1 = (aN + bN, aN - bN)   -> outputs L/4 and 3L/4
//   real-valued FFT version of type A (k = 0):
//                    out0 = (aP + bP, aP - bP),  out1 = (aN, -bN)
//   preliminary (first stage, 2-point transforms of each pair):
//        out0 = (aP + aN, aP - aN),  out1 = (bP + bN, bP - bN)
// 'swap' exchanges out0 and out1; it is set in the blocks whose outputs must
// leave in the other order for the perfect-shuffle naming of the pairs.
//
// All values are DATA_W-bit two's complement; coefficients have COEF_W-1
// fraction bits and products are rounded to nearest. Before the butterfly the
// operands are shifted right by op.shift bits (block floating point); the
// output flags big1/big2 report results of magnitude >= 2^(DATA_W-3) resp.
// 2^(DATA_W-2), from which the control unit picks the next stage's shift.
// With that rule the butterfly gain (at most 1+sqrt(2)) cannot overflow.
//
// Timing: a fully pipelined linear pipeline of 5 registers (pre-scale,
// multiply, product sum, add/subtract, output order); one butterfly per cycle.
// Together with the operand fetch before it and the memory write after it the
// processing step is the document's 7-stage pipeline. The equations follow the
// document; the scaling rule, rounding and register split are this design's.
module fht_pe
  import fht_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned COEF_W = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       valid_i,
  input  pe_op_t                     op_i,
  input  logic signed [DATA_W-1:0]   a_p_i, a_n_i, b_p_i, b_n_i,
  input  logic signed [COEF_W-1:0]   cos_i, sin_i,
  output logic                       valid_o,
  output logic signed [DATA_W-1:0]   o0_p_o, o0_n_o, o1_p_o, o1_n_o,
  output logic                       big1_o,
  output logic                       big2_o
);

  localparam int unsigned PW = DATA_W + COEF_W;   // product width
  localparam int unsigned TW = DATA_W + 2;        // twiddled value width
  localparam int unsigned SWD = DATA_W + 3;       // sum width
  localparam int unsigned LATENCY = 5;            // valid_i to valid_o

  // The five PE stages plus the memory read and the memory write make up the
  // processing step length the control unit schedules with.
  if (LATENCY + 2 != PIPE_LEN) begin : g_bad_latency
    $error("fht_pe: LATENCY + 2 must equal fht_pkg::PIPE_LEN");
  end

  // ---- stage 1: block-floating-point pre-scale ----------------------------
  logic                      v1;
  pe_mode_e                  mode1;
  logic                      swap1;
  logic signed [DATA_W-1:0]  ap1, an1, bp1, bn1;
  logic signed [COEF_W-1:0]  c1, s1;

  // shift right by 0..2 bits, rounding to nearest (ties upwards)
  function automatic logic signed [DATA_W-1:0] prescale(logic signed [DATA_W-1:0] v,
                                                       logic [1:0] sh);
    logic signed [DATA_W:0] w;
    w = (DATA_W+1)'(v);
    if (sh != 2'd0) w = w + ((DATA_W+1)'(1) <<< (sh - 2'd1));
    return DATA_W'(w >>> sh);
  endfunction

  always_ff @(posedge clk) begin
    ap1 <= prescale(a_p_i, op_i.shift);
    an1 <= prescale(a_n_i, op_i.shift);
    bp1 <= prescale(b_p_i, op_i.shift);
    bn1 <= prescale(b_n_i, op_i.shift);
    mode1 <= op_i.mode;
    swap1 <= op_i.swap;
    c1  <= cos_i;
    s1  <= sin_i;
  end

  // ---- stage 2: the four products ----------------------------------------
  logic                      v2;
  pe_mode_e                  mode2;
  logic                      swap2;
  logic signed [DATA_W-1:0]  ap2, an2, bp2, bn2;
  logic signed [PW-1:0]      cbp2, sbn2, cbn2, sbp2;

  always_ff @(posedge clk) begin
    cbp2 <= PW'(c1) * PW'(bp1);
    sbn2 <= PW'(s1) * PW'(bn1);
    cbn2 <= PW'(c1) * PW'(bn1);
    sbp2 <= PW'(s1) * PW'(bp1);
    ap2 <= ap1; an2 <= an1; bp2 <= bp1; bn2 <= bn1;
    mode2 <= mode1;
    swap2 <= swap1;
  end

  // ---- stage 3: product sums, rounded; pick butterfly operands ------------
  logic                      v3;
  pe_mode_e                  mode3;
  logic                      swap3;
  logic signed [TW-1:0]      l0_3, r0_3, l1_3, r1_3;
  logic signed [PW:0]        t1_full, t2_full;

  always_comb begin
    t1_full = (PW+1)'(cbp2) + (PW+1)'(sbn2) + (PW+1)'(1 << (COEF_W - 2));
    t2_full = (PW+1)'(cbn2) - (PW+1)'(sbp2) + (PW+1)'(1 << (COEF_W - 2));
  end

  always_ff @(posedge clk) begin
    mode3 <= mode2;
    swap3 <= swap2;
    unique case (mode2)
      OP_TYPE_B: begin
        l0_3 <= TW'(ap2); r0_3 <= TW'(t1_full >>> (COEF_W - 1));
        l1_3 <= TW'(an2); r1_3 <= TW'(t2_full >>> (COEF_W - 1));
      end
      OP_TYPE_A, OP_RFFT_A: begin  // RFFT: stage 4 forms aN and -bN instead
        l0_3 <= TW'(ap2); r0_3 <= TW'(bp2);
        l1_3 <= TW'(an2); r1_3 <= TW'(bn2);
      end
      default: begin  // OP_PRELIM
        l0_3 <= TW'(ap2); r0_3 <= TW'(an2);
        l1_3 <= TW'(bp2); r1_3 <= TW'(bn2);
      end
    endcase
  end

  // ---- stage 4: add / subtract --------------------------------------------
  logic                      v4;
  pe_mode_e                  mode4;
  logic                      swap4;
  logic signed [SWD-1:0]     sum0, dif0, sum1, dif1;

  always_ff @(posedge clk) begin
    mode4 <= mode3;
    swap4 <= swap3;
    sum0 <= SWD'(l0_3) + SWD'(r0_3);
    dif0 <= SWD'(l0_3) - SWD'(r0_3);
    sum1 <= (mode3 == OP_RFFT_A) ? SWD'(l1_3) : SWD'(l1_3) + SWD'(r1_3);
    dif1 <= (mode3 == OP_RFFT_A) ? -SWD'(r1_3) : SWD'(l1_3) - SWD'(r1_3);
  end

  // ---- stage 5: output order, scaling flags -------------------------------
  logic signed [DATA_W-1:0] q0p, q0n, q1p, q1n;
  logic                     bg1, bg2;

  function automatic logic is_big(logic signed [DATA_W-1:0] v, int unsigned top);
    // true when the top 'top' bits are not all copies of the sign bit
    logic [DATA_W-1:0] u;
    u = v;
    return (u[DATA_W-1 -: 3] != {3{u[DATA_W-1]}} && top == 3) ||
           (u[DATA_W-1 -: 2] != {2{u[DATA_W-1]}} && top == 2);
  endfunction

  always_comb begin
    if (mode4 == OP_TYPE_B) begin
      q0p = DATA_W'(sum0); q0n = DATA_W'(sum1);
      q1p = DATA_W'(dif1); q1n = DATA_W'(dif0);
    end else begin
      q0p = DATA_W'(sum0); q0n = DATA_W'(dif0);
      q1p = DATA_W'(sum1); q1n = DATA_W'(dif1);
    end
    bg1 = is_big(q0p, 3) || is_big(q0n, 3) || is_big(q1p, 3) || is_big(q1n, 3);
    bg2 = is_big(q0p, 2) || is_big(q0n, 2) || is_big(q1p, 2) || is_big(q1n, 2);
  end

  always_ff @(posedge clk) begin
    if (swap4) begin
      o0_p_o <= q1p; o0_n_o <= q1n; o1_p_o <= q0p; o1_n_o <= q0n;
    end else begin
      o0_p_o <= q0p; o0_n_o <= q0n; o1_p_o <= q1p; o1_n_o <= q1n;
    end
  end

  // valid chain and the flags read by the control unit: synchronous reset
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {v1, v2, v3, v4, valid_o} <= '0;
      big1_o <= 1'b0;
      big2_o <= 1'b0;
    end else begin
      v1 <= valid_i; v2 <= v1; v3 <= v2; v4 <= v3; valid_o <= v4;
      big1_o <= v4 && bg1;
      big2_o <= v4 && bg2;
    end
  end

  // The sums must fit the output width: block floating point guarantees it.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    v4 |-> (sum0 == SWD'(q0p) && dif1 == SWD'(mode4 == OP_TYPE_B ? q1p : q1n) &&
            sum1 == SWD'(mode4 == OP_TYPE_B ? q0n : q1p) &&
            dif0 == SWD'(mode4 == OP_TYPE_B ? q1n : q0n)));

endmodule
