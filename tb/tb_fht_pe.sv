// tb_fht_pe: self-checking test of the double-butterfly processor element.
//
// Feeds random operands, coefficients, modes (preliminary, type A, type B,
// real-valued FFT type A), output orders and pre-scale shifts, one butterfly
// per cycle with random gaps, and compares each result
// bit for bit with an integer model of the butterfly equations written here.
// Checks that results appear exactly 5 cycles after their operands and that
// the block-floating-point flags are right.
module tb_fht_pe;
  import fht_pkg::*;
  localparam int DW = 16;
  localparam int CW = 16;
  localparam int LAT = 5;
  localparam int NVEC = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic valid_i = 0, valid_o, big1_o, big2_o;
  pe_op_t op_i;
  logic signed [DW-1:0] a_p_i, a_n_i, b_p_i, b_n_i, o0_p_o, o0_n_o, o1_p_o, o1_n_o;
  logic signed [CW-1:0] cos_i, sin_i;

  fht_pe #(.DATA_W(DW), .COEF_W(CW)) dut (.*);

  typedef struct {
    int o0p, o0n, o1p, o1n;
    bit b1, b2;
    int t;
  } exp_t;
  exp_t q[$];
  int checks = 0, failures = 0, cyc = 0;

  function automatic int pres(int v, int sh);
    if (sh == 0) return v;
    return (v + (1 << (sh - 1))) >>> sh;
  endfunction

  function automatic bit big(int v, int lim);
    return (v >= lim) || (v < -lim);
  endfunction

  function automatic exp_t model(pe_op_t op, int ap, int an, int bp, int bn, int c, int s);
    exp_t e;
    int t1, t2, r0p, r0n, r1p, r1n;
    longint p;
    ap = pres(ap, int'(op.shift)); an = pres(an, int'(op.shift));
    bp = pres(bp, int'(op.shift)); bn = pres(bn, int'(op.shift));
    p  = longint'(c) * bp + longint'(s) * bn + (1 << (CW - 2));
    t1 = int'(p >>> (CW - 1));
    p  = longint'(c) * bn - longint'(s) * bp + (1 << (CW - 2));
    t2 = int'(p >>> (CW - 1));
    case (op.mode)
      OP_TYPE_B: begin r0p = ap + t1; r0n = an + t2; r1p = an - t2; r1n = ap - t1; end
      OP_TYPE_A: begin r0p = ap + bp; r0n = ap - bp; r1p = an + bn; r1n = an - bn; end
      OP_RFFT_A: begin r0p = ap + bp; r0n = ap - bp; r1p = an;      r1n = -bn;     end
      default:   begin r0p = ap + an; r0n = ap - an; r1p = bp + bn; r1n = bp - bn; end
    endcase
    if (op.swap) begin e.o0p = r1p; e.o0n = r1n; e.o1p = r0p; e.o1n = r0n; end
    else         begin e.o0p = r0p; e.o0n = r0n; e.o1p = r1p; e.o1n = r1n; end
    e.b1 = big(r0p, 1 << (DW-3)) || big(r0n, 1 << (DW-3)) || big(r1p, 1 << (DW-3)) || big(r1n, 1 << (DW-3));
    e.b2 = big(r0p, 1 << (DW-2)) || big(r0n, 1 << (DW-2)) || big(r1p, 1 << (DW-2)) || big(r1n, 1 << (DW-2));
    return e;
  endfunction

  // compare outputs
  int issue_t[$];
  always @(posedge clk) begin
    cyc++;
    if (rst_n && valid_i) issue_t.push_back(cyc);
    if (rst_n && valid_o) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        e = q.pop_front();
        e.t = issue_t.pop_front();
        if (int'(o0_p_o) != e.o0p || int'(o0_n_o) != e.o0n || int'(o1_p_o) != e.o1p ||
            int'(o1_n_o) != e.o1n ||
            big1_o != e.b1 || big2_o != e.b2 || cyc - e.t != LAT) begin
          failures++;
          if (failures < 10)
            $display("mismatch: got %0d %0d %0d %0d (%b%b) exp %0d %0d %0d %0d (%b%b) lat %0d",
                     o0_p_o, o0_n_o, o1_p_o, o1_n_o, big1_o, big2_o,
                     e.o0p, e.o0n, e.o1p, e.o1n, e.b1, e.b2, cyc - e.t);
        end
      end
    end
  end

  int n_mode [4];
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < NVEC; i++) begin
      if ($urandom_range(0, 3) == 0) begin
        valid_i <= 0;
      end else begin
        pe_op_t op;
        int lim, ap, an, bp, bn, c, s;
        op.mode  = pe_mode_e'($urandom_range(0, 3));
        op.swap  = 1'($urandom_range(0, 1));
        op.shift = 2'($urandom_range(0, 2));
        lim = (1 << (DW - 3)) << op.shift;          // largest magnitude that cannot overflow
        if (lim > (1 << (DW - 1)) - 1) lim = (1 << (DW - 1)) - 1;
        ap = int'($urandom_range(0, 2 * lim)) - lim;
        an = int'($urandom_range(0, 2 * lim)) - lim;
        bp = int'($urandom_range(0, 2 * lim)) - lim;
        bn = int'($urandom_range(0, 2 * lim)) - lim;
        c  = int'($urandom_range(0, (1 << (CW - 1)) - 1));
        s  = int'($urandom_range(0, (1 << (CW - 1)) - 1));
        n_mode[op.mode]++;
        valid_i <= 1; op_i <= op;
        a_p_i <= DW'(ap); a_n_i <= DW'(an); b_p_i <= DW'(bp); b_n_i <= DW'(bn);
        cos_i <= CW'(c); sin_i <= CW'(s);
        q.push_back(model(op, ap, an, bp, bn, c, s));
      end
      @(posedge clk);
    end
    valid_i <= 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d results missing", q.size()); end
    checks++;
    if (n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0 || n_mode[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NVEC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
