// fht_clut: coefficient look-up table (CLUT) of one processor block.
//
// Holds the twiddle pairs (cos, sin of 2*pi*k/L) that this block's processor
// element needs, and tells the element which kind of butterfly to perform.
// Every block has its own contents (PB_ID is a parameter) but all blocks are
// addressed alike by the control unit, so the array stays SIMD.
//
// Stages are numbered 1..M for an N = 2^M point transform. Stage 1 is the
// preliminary 2-point stage and stage 2 has only k = 0 butterflies; neither
// needs coefficients. The following N1 = log2(N_PB) "low" stages use a single
// coefficient pair per block, selected by the stage number. The remaining
// "high" stages N1+2+h (h = 1..N2-1) use 2^h pairs each. The high part holds
// the 2^(N2-1) pairs of the last stage; high stage h uses its first 2^h
// entries, at address r mod 2^h supplied by the control unit. This works
// because butterfly r of stage N1+2+h has the same angle 2*pi*k/L as
// butterfly r of the last stage for r < 2^h.
// A stored flag marks the k = 0 slots (type A butterflies); in the
// real-valued FFT version these become OP_RFFT_A.
//
// Coefficients are COEF_W-bit two's complement with COEF_W-1 fraction bits
// (0 <= cos, sin < 1 for 0 < k < L/4). Contents are computed at elaboration.
// Timing: inputs in cycle t, registered outputs in cycle t+1 (aligned with the
// data memory read).
//
// The split into low and high parts and the size of the high part
// (2^(N2-1) pairs) follow the document; the low part starting at stage 3 and
// the encodings are this design's.
module fht_clut
  import fht_pkg::*;
#(
  parameter int unsigned N_POINTS = 1024,
  parameter int unsigned N_PB     = 8,
  parameter int unsigned PB_ID    = 0,
  parameter int unsigned COEF_W   = 16,
  localparam int unsigned M       = $clog2(N_POINTS),
  localparam int unsigned N1      = $clog2(N_PB),
  localparam int unsigned N2      = M - 1 - N1,
  localparam int unsigned SW      = $clog2(M + 1),
  localparam int unsigned HN      = 1 << (N2 - 1),   // high CLUT part size
  localparam int unsigned HAW     = (N2 > 1) ? N2 - 1 : 1
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     rfft,     // real-valued FFT version
  input  logic [SW-1:0]            stage,    // 1..M
  input  logic                     hi,       // stage is a high stage
  input  logic [HAW-1:0]           hi_addr,  // address in the high part
  output logic signed [COEF_W-1:0] cos_o,
  output logic signed [COEF_W-1:0] sin_o,
  output pe_mode_e                 mode_o,
  output logic                     swap_o
);

  typedef struct packed {
    logic                     type_a;
    logic signed [COEF_W-1:0] c;
    logic signed [COEF_W-1:0] s;
  } coef_t;

  localparam int unsigned LN = (N1 > 0) ? N1 : 1;
  localparam int unsigned HS = HN;
  // Tables are kept as arrays of plain vectors holding coef_t values.
  typedef logic [2*COEF_W:0] word_t;
  typedef word_t low_tab_t  [LN];
  typedef word_t high_tab_t [HS];

  function automatic word_t make_coef(int unsigned j, int unsigned s);
    coef_t       e;
    int unsigned k;
    real         ang, scale;
    longint      cv, sv;
    k     = twiddle_k(j, s);
    scale = real'(longint'(1) << (COEF_W - 1));
    ang   = 2.0 * 3.14159265358979323846 * real'(k) / real'(longint'(1) << s);
    cv    = longint'($floor($cos(ang) * scale + 0.5));
    sv    = longint'($floor($sin(ang) * scale + 0.5));
    if (cv > (longint'(1) << (COEF_W - 1)) - 1) cv = (longint'(1) << (COEF_W - 1)) - 1;
    if (sv > (longint'(1) << (COEF_W - 1)) - 1) sv = (longint'(1) << (COEF_W - 1)) - 1;
    e.type_a = (k == 0);
    e.c      = COEF_W'(cv);
    e.s      = COEF_W'(sv);
    return word_t'(e);
  endfunction

  function automatic low_tab_t build_low();
    low_tab_t t;
    for (int unsigned i = 0; i < LN; i++) t[i] = make_coef(PB_ID, i + 3);
    return t;
  endfunction

  function automatic high_tab_t build_high();
    high_tab_t t;
    for (int unsigned i = 0; i < HS; i++)
      t[i] = (N2 > 1) ? make_coef((i << N1) | PB_ID, M) : '0;
    return t;
  endfunction

  localparam low_tab_t  LOW_TAB  = build_low();
  localparam high_tab_t HIGH_TAB = build_high();

  coef_t entry;

  always_comb begin
    entry = '0;
    if (hi) begin
      if (int'(hi_addr) < HS) entry = coef_t'(HIGH_TAB[hi_addr]);
    end else if (stage >= SW'(3) && int'(stage) - 3 < LN) begin
      entry = coef_t'(LOW_TAB[int'(stage) - 3]);
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      cos_o  <= entry.c;
      sin_o  <= entry.s;
      swap_o <= (stage >= SW'(3)) && ((PB_ID & 1) != 0);
      if (stage == SW'(1))                   mode_o <= OP_PRELIM;
      else if (stage == SW'(2) || entry.type_a) mode_o <= rfft ? OP_RFFT_A : OP_TYPE_A;
      else                                   mode_o <= OP_TYPE_B;
    end
  end

endmodule
