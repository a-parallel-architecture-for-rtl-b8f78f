// tb_fht_control: self-checking test of the control unit (1024 points,
// 8 blocks).
//
// Loads a block of samples and checks where each one is stored; then follows
// the computation cycle by cycle, checking stage numbers and their length,
// read and write addresses, the memory bank in use, CLUT addresses, and the
// block-floating-point shift chosen from "big" flags that the test raises at
// chosen stages; finally checks the unload addresses for every output index,
// the block exponent and the done pulse. Runs one FHT and one real-valued
// FFT block, which differ in where and with which sign results are read.
// Expected values are derived here from the identifier rules (rotations done
// digit by digit, D-class search).
module tb_fht_control;
  import fht_pkg::*;
  localparam int N   = 1024;
  localparam int NPB = 8;
  localparam int DW  = 16;
  localparam int M   = $clog2(N);
  localparam int N1  = $clog2(NPB);
  localparam int N2  = M - 1 - N1;
  localparam int B   = 1 << (N2 - 1);
  localparam int SW  = $clog2(M + 1);
  localparam int HAW = (N2 > 1) ? N2 - 1 : 1;
  localparam int EW  = $clog2(2 * M + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_rfft = 0, in_ready;
  logic [DW-1:0] in_data = 0;
  logic rd_en, rd_bank, clut_hi, ld_en, ul_en, ul_bank, out_valid, out_half, out_neg, busy, done, rfft;
  logic [N2-1:0] rd_addr_a, rd_addr_b, wr_addr_a, wr_addr_b, ld_addr, ul_addr;
  logic [SW-1:0] stage;
  logic [HAW-1:0] clut_addr;
  logic [1:0] shift, ld_we;
  logic [N1-1:0] ld_pb, out_pb;
  logic [2*DW-1:0] ld_data;
  logic [NPB-1:0] big1 = 0, big2 = 0;
  logic [M-1:0] out_index;
  logic [EW-1:0] out_exp;

  fht_control #(.N_POINTS(N), .N_PB(NPB), .DATA_W(DW)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int rotr(int v, int bits);
    int b[$], r;
    for (int i = 0; i < bits; i++) b.push_back((v >> i) & 1);
    r = 0;
    for (int i = 0; i < bits; i++) r |= b[(i + 1) % bits] << i;
    return r;
  endfunction

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

  // which stages raise which flag: stage%3==1 -> big1, stage%3==2 -> big2
  function automatic int shift_after(int s);
    return (s % 3 == 2) ? 2 : ((s % 3 == 1) ? 1 : 0);
  endfunction

  int exp_total;

  task automatic one_transform(bit mode);
    // ---- load: one large sample makes the first stage shift by 2
    for (int n = 0; n < N; n++) begin
      int pos;
      in_valid <= 1;
      in_rfft  <= (n == 0) ? mode : !mode;   // only the first sample's value counts
      in_data  <= (n == 5) ? DW'(20000) : DW'(n % 100);
      #1;
      check(in_ready, "in_ready during load");
      pos = rotr(n % (N / 2), M - 1);
      check(ld_en && ld_pb == N1'(pos % NPB) && ld_addr == N2'(pos / NPB) &&
            ld_we == ((n < N / 2) ? 2'b01 : 2'b10) && ld_data[DW-1:0] == in_data,
            $sformatf("load address of sample %0d", n));
      @(posedge clk);
    end
    in_valid <= 0;
    exp_total = 2;
    // ---- compute
    for (int s = 1; s <= M; s++) begin
      for (int c = 0; c < B + 7; c++) begin
        #1;
        check(!in_ready && busy, "busy while computing");
        check(stage == SW'(s), $sformatf("stage %0d", s));
        check(rfft == mode, "transform version");
        check(rd_bank == 1'((s - 1) % 2), "source bank");
        check(shift == 2'((s == 1) ? 2 : shift_after(s - 1)), $sformatf("shift of stage %0d", s));
        check(rd_en == (c < B), "read enable");
        if (c < B) begin
          int h;
          h = s - 2 - N1;
          check(rd_addr_a == N2'(c) && rd_addr_b == N2'(c + B), "read addresses");
          check(clut_hi == (h >= 1), "clut part");
          if (h >= 1) check(clut_addr == HAW'(c % (1 << h)), "clut address");
        end
        if (c >= 6 && c < B + 6)
          check(wr_addr_a == N2'(2 * (c - 6)) && wr_addr_b == N2'(2 * (c - 6) + 1), "write addresses");
        // raise flags in the middle of the stage on one block
        big1 <= '0; big2 <= '0;
        if (c == B / 2) begin
          if (s % 3 == 1) big1[s % NPB] <= 1'b1;
          if (s % 3 == 2) begin big2[s % NPB] <= 1'b1; big1[s % NPB] <= 1'b1; end
        end
        @(posedge clk);
      end
      if (s < M) exp_total += shift_after(s);
    end
    // ---- unload
    for (int k = 0; k < N; k++) begin
      int kp, d, id;
      bit nh, ng;
      #1;
      ng = 0;
      if (k == 0 || k == N / 2) begin d = 0; nh = (k != 0); end
      else begin
        kp = (k > N / 2) ? N - k : k;
        d  = in_d(kp) ? kp : N - kp;
        if (!mode) nh = (k > N / 2);
        // RFFT: a C-class k holds (Re, Im), a D-class k holds (-Im, Re)
        else if (k < N / 2) nh = in_d(kp);
        else begin nh = !in_d(kp); ng = in_d(kp); end
      end
      id = ident(d, M);
      check(ul_en && ul_bank == 1'(M % 2) && ul_addr == N2'(id / NPB),
            $sformatf("unload address of H[%0d]", k));
      if (k > 0) check(out_valid && out_index == M'(k - 1), "out_valid/out_index");
      @(posedge clk);
      #1;
      check(out_pb == N1'(id % NPB) && out_half == 1'(nh) && out_neg == 1'(ng),
            $sformatf("unload block/half/sign of output %0d", k));
      check(out_exp == EW'(exp_total), "block exponent");
    end
    #1;
    check(out_valid && out_index == M'(N - 1) && done, "last output and done");
    @(posedge clk);
    #1;
    check(!done && !busy && in_ready, "idle after done");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    one_transform(0);
    one_transform(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * (3 * N + M * (B + 7)) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
