// tb_fht_pb: self-checking test of one processor block (block 1 of a
// 64-point, 4-block array).
//
// Loads random PN pairs into DM0 through the load port, runs stage 5 (a high
// stage, type B butterflies with swapped outputs), stage 1 (preliminary),
// stage 2 (type A, in both transform versions), stages 3 and 4 (low stages)
// and stage 6 (the last high stage) by driving the control signals as the
// control unit would. Compares the block's result links with an integer
// butterfly model using twiddles found here by brute force. While a stage runs, pairs arriving on
// the two input links are written into the other DM; they are read back
// through the unload port and compared. Checks the 6-cycle read-to-result
// timing.
module tb_fht_pb;
  import fht_pkg::*;
  localparam int N   = 64;
  localparam int NPB = 4;
  localparam int P   = 1;
  localparam int DW  = 16;
  localparam int CW  = 16;
  localparam int M   = $clog2(N);
  localparam int N1  = $clog2(NPB);
  localparam int N2  = M - 1 - N1;
  localparam int B   = 1 << (N2 - 1);
  localparam int D   = 1 << N2;
  localparam int SW  = $clog2(M + 1);
  localparam int HAW = (N2 > 1) ? N2 - 1 : 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rd_en = 0, rd_bank = 0, clut_hi = 0, link0_valid = 0, link1_valid = 0;
  logic [N2-1:0] rd_addr_a = 0, rd_addr_b = 0, wr_addr_a = 0, wr_addr_b = 0, ld_addr = 0, ul_addr = 0;
  logic [SW-1:0] stage = 1;
  logic [HAW-1:0] clut_addr = 0;
  logic [1:0] shift = 0, ld_we = 0;
  logic [2*DW-1:0] link0_data = 0, link1_data = 0, ld_data = 0, out0_data, out1_data, ul_data;
  logic out_valid, big1, big2, ld_en = 0, ul_en = 0, ul_bank = 0, rfft = 0;

  fht_pb #(.N_POINTS(N), .N_PB(NPB), .PB_ID(P), .DATA_W(DW), .COEF_W(CW)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int mem0p [D], mem0n [D];

  function automatic bit in_d(int k);
    if (k == 0) return 1;
    while (k % 2 == 0) k /= 2;
    return (k % 4) == 3;
  endfunction
  function automatic int ident(int d, int s);
    int bits[$], res, lo;
    for (int i = 0; i < s; i++) bits.push_back((d >> i) & 1);
    lo = -1;
    for (int i = 0; i < s; i++) if (bits[i] == 1 && lo < 0) lo = i;
    if (lo < 0) lo = 0;
    bits.delete(lo);
    res = 0;
    for (int i = 0; i < s - 1; i++) res = (res << 1) | bits[i];
    return res;
  endfunction
  function automatic int find_k(int j, int s);
    int kf, l;
    l  = 1 << s;
    kf = j % (1 << (s - 2));
    for (int d = 0; d < l / 2; d++)
      if (in_d(d) && ident(d, s - 1) == kf) return (d < l / 4) ? d : l / 2 - d;
    return -1;
  endfunction
  function automatic int pres(int v, int sh);
    if (sh == 0) return v;
    return (v + (1 << (sh - 1))) >>> sh;
  endfunction

  // expected (out0, out1) of slot r in stage s
  function automatic void expect_bfly(int s, int r, int sh, output int e[4]);
    int ap, an, bp, bn, k, c, sn, t1, t2, o[4];
    real a;
    ap = pres(mem0p[r], sh); an = pres(mem0n[r], sh);
    bp = pres(mem0p[r + B], sh); bn = pres(mem0n[r + B], sh);
    if (s == 1) begin
      o = '{ap + an, ap - an, bp + bn, bp - bn};
    end else begin
      k = find_k((r << N1) | P, s);
      if ((s == 2 || k == 0) && rfft) o = '{ap + bp, ap - bp, an, -bn};
      else if (s == 2 || k == 0) o = '{ap + bp, ap - bp, an + bn, an - bn};
      else begin
        a  = 2.0 * 3.14159265358979323846 * k / real'(1 << s);
        c  = int'($cos(a) * 32768.0); sn = int'($sin(a) * 32768.0);
        t1 = int'((longint'(c) * bp + longint'(sn) * bn + 16384) >>> 15);
        t2 = int'((longint'(c) * bn - longint'(sn) * bp + 16384) >>> 15);
        o  = '{ap + t1, an + t2, an - t2, ap - t1};
      end
    end
    if (s >= 3 && (P % 2) == 1) e = '{o[2], o[3], o[0], o[1]};
    else e = o;
  endfunction

  int issue_q[$], stage_q[$], n_a = 0, n_b = 0;
  int cur_stage, cur_shift;

  always @(posedge clk) begin
    cyc++;
    if (rd_en) issue_q.push_back(cyc);
    if (out_valid) begin
      int r, e[4], t;
      t = issue_q.pop_front();
      r = stage_q.pop_front();
      expect_bfly(cur_stage, r, cur_shift, e);
      checks++;
      if (cyc - t != 6 ||
          int'($signed(out0_data[DW-1:0])) != e[0] || int'($signed(out0_data[2*DW-1:DW])) != e[1] ||
          int'($signed(out1_data[DW-1:0])) != e[2] || int'($signed(out1_data[2*DW-1:DW])) != e[3]) begin
        failures++;
        $display("stage %0d slot %0d: got %0d %0d %0d %0d exp %0d %0d %0d %0d (lat %0d)",
                 cur_stage, r, $signed(out0_data[DW-1:0]), $signed(out0_data[2*DW-1:DW]),
                 $signed(out1_data[DW-1:0]), $signed(out1_data[2*DW-1:DW]),
                 e[0], e[1], e[2], e[3], cyc - t);
      end
      if (dut.u_pe.mode4 == OP_TYPE_A) n_a++;
    end
  end

  logic [2*DW-1:0] linkw [D];

  task automatic run_stage(int s, int sh);
    cur_stage = s; cur_shift = sh;
    for (int c = 0; c < B + 7; c++) begin
      int h;
      h = s - 2 - N1;
      rd_en <= (c < B); rd_bank <= 0; stage <= SW'(s); shift <= 2'(sh);
      rd_addr_a <= N2'(c); rd_addr_b <= N2'(c + B);
      clut_hi <= (h >= 1);
      clut_addr <= (h >= 1) ? HAW'(c % (1 << h)) : '0;
      if (c < B) stage_q.push_back(c);
      // link traffic into DM1 at the slots the write schedule uses
      link0_valid <= (c >= 6 && c < B + 6); link1_valid <= (c >= 6 && c < B + 6);
      if (c >= 6 && c < B + 6) begin
        wr_addr_a <= N2'(2 * (c - 6)); wr_addr_b <= N2'(2 * (c - 6) + 1);
        link0_data <= linkw[2 * (c - 6)]; link1_data <= linkw[2 * (c - 6) + 1];
      end
      @(posedge clk);
    end
    rd_en <= 0; link0_valid <= 0; link1_valid <= 0;
    @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // load DM0: P halves then N halves
    for (int h = 0; h < 2; h++)
      for (int a = 0; a < D; a++) begin
        int v;
        v = int'($urandom_range(0, 2 * 30000)) - 30000;
        if (h == 0) mem0p[a] = v; else mem0n[a] = v;
        ld_en <= 1; ld_we <= (h != 0) ? 2'b10 : 2'b01; ld_addr <= N2'(a); ld_data <= {DW'(v), DW'(v)};
        @(posedge clk);
      end
    ld_en <= 0;
    for (int a = 0; a < D; a++) linkw[a] = {16'($urandom), 16'($urandom)};
    @(posedge clk);
    run_stage(5, 2);
    run_stage(1, 2);
    run_stage(2, 1);
    rfft <= 1;
    run_stage(2, 1);
    rfft <= 0;
    run_stage(3, 2);
    run_stage(4, 2);
    run_stage(6, 2);
    // read DM1 back through the unload port
    for (int a = 0; a < D; a++) begin
      ul_en <= 1; ul_bank <= 1; ul_addr <= N2'(a);
      @(posedge clk);
      #1;
      checks++;
      if (ul_data != linkw[a]) begin
        failures++; $display("DM1[%0d] = %h, expected %h", a, ul_data, linkw[a]);
      end
    end
    ul_en <= 0;
    checks++;
    if (n_a == 0 || issue_q.size() != 0) begin failures++; $display("no type A slot or lost result"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
