// tb_fht_clut: self-checking test of the coefficient tables of all blocks.
//
// For every block of a 1024-point, 8-block array, every stage and every
// butterfly slot, drives the CLUT with the addresses the control unit would
// give and compares the registered outputs (cos, sin, butterfly type, output
// order) with values derived here by brute force: the twiddle index is found
// by searching the D-class value whose identifier matches the slot.
module tb_fht_clut;
  import fht_pkg::*;
  localparam int N   = 1024;
  localparam int NPB = 8;
  localparam int CW  = 16;
  localparam int M   = $clog2(N);
  localparam int N1  = $clog2(NPB);
  localparam int N2  = M - 1 - N1;
  localparam int B   = 1 << (N2 - 1);
  localparam int SW  = $clog2(M + 1);
  localparam int HAW = (N2 > 1) ? N2 - 1 : 1;

  logic clk = 0;
  always #5 clk = ~clk;

  logic en = 1, rfft = 0;
  logic [SW-1:0] stage = 1;
  logic hi = 0;
  logic [HAW-1:0] hi_addr = 0;
  logic signed [CW-1:0] cos_o [NPB], sin_o [NPB];
  pe_mode_e mode_o [NPB];
  logic swap_o [NPB];

  for (genvar p = 0; p < NPB; p++) begin : g
    fht_clut #(.N_POINTS(N), .N_PB(NPB), .PB_ID(p), .COEF_W(CW)) u (
      .clk, .en, .rfft, .stage, .hi, .hi_addr,
      .cos_o(cos_o[p]), .sin_o(sin_o[p]), .mode_o(mode_o[p]), .swap_o(swap_o[p]));
  end

  int checks = 0, failures = 0;

  // identifier digits of a D-class value d (s bits): delete its lowest '1'
  // (or one '0' when d = 0), then reverse the remaining s-1 digits
  function automatic int ident(int d, int s);
    int bits[$], res, lo;
    for (int i = 0; i < s; i++) bits.push_back((d >> i) & 1);   // bits[0] = LSB
    lo = -1;
    for (int i = 0; i < s; i++) if (bits[i] == 1 && lo < 0) lo = i;
    if (lo < 0) lo = 0;
    bits.delete(lo);
    res = 0;
    for (int i = 0; i < s - 1; i++) res = (res << 1) | bits[i];   // reversed
    return res;
  endfunction

  function automatic bit in_d(int k);
    if (k == 0) return 1;
    while (k % 2 == 0) k /= 2;
    return (k % 4) == 3;
  endfunction

  function automatic int find_k(int j, int s);
    int kf, l;
    l  = 1 << s;
    kf = j % (1 << (s - 2));
    for (int d = 0; d < l / 2; d++)
      if (in_d(d) && ident(d, s - 1) == kf) return (d < l / 4) ? d : l / 2 - d;
    return -1;
  endfunction

  initial begin
    @(posedge clk);
    for (int s = 1; s <= M; s++) begin
      for (int r = 0; r < B; r++) begin
        int h;
        h = s - 2 - N1;
        stage <= SW'(s);
        rfft <= 1'($urandom_range(0, 1));
        hi <= (h >= 1);
        hi_addr <= (h >= 1) ? HAW'(r % (1 << h)) : '0;
        @(posedge clk);
        #1;
        for (int p = 0; p < NPB; p++) begin
          pe_mode_e em;
          int k, ec, es;
          bit esw;
          esw = (s >= 3) && (p % 2 == 1);
          ec = 0; es = 0;
          if (s == 1) em = OP_PRELIM;
          else if (s == 2) em = rfft ? OP_RFFT_A : OP_TYPE_A;
          else begin
            real a;
            k  = find_k((r << N1) | p, s);
            em = (k == 0) ? (rfft ? OP_RFFT_A : OP_TYPE_A) : OP_TYPE_B;
            a  = 2.0 * 3.14159265358979323846 * k / real'(1 << s);
            ec = int'($cos(a) * 32768.0);
            es = int'($sin(a) * 32768.0);
            if (ec > 32767) ec = 32767;
            if (es > 32767) es = 32767;
          end
          checks++;
          if (mode_o[p] != em || swap_o[p] != esw ||
              (em == OP_TYPE_B && (int'(cos_o[p]) != ec || int'(sin_o[p]) != es))) begin
            failures++;
            if (failures < 10)
              $display("pb %0d stage %0d r %0d: got %0d %0d %0d %0d exp %0d %0d %0d %0d",
                       p, s, r, mode_o[p], swap_o[p], cos_o[p], sin_o[p], em, esw, ec, es);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (M * B + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
