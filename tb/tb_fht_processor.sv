// tb_fht_processor: end-to-end test of the parallel FHT/RFFT processor on a
// 64-point, 4-block array (quick). Runs six input kinds in the FHT version and
// again in the real-valued FFT version, back to back.
//
// Compares every output * 2^exp with a double-precision reference of the same
// samples: a discrete Hartley transform in the FHT version, a direct
// real-input DFT in the real-valued FFT version (Re F(k) at k, Im F(k) at N-k).
// The input kinds are chosen so that the block-floating-point scaler takes no
// shift, a 1-bit and a 2-bit shift. Each run also checks the computation time
// M*(2^(N2-1) + 7) cycles. The test counts the mechanisms of the array:
// preliminary, type A, RFFT type A and type B butterflies, swapped output
// order, results crossing to another block, and each scaling step. One that
// never happens counts as a failure.
module tb_fht_processor;
  localparam int unsigned N      = 64;
  localparam int unsigned NPB    = 4;
  localparam int unsigned DW     = 16;
  localparam int unsigned M      = $clog2(N);
  localparam int unsigned N1     = $clog2(NPB);
  localparam int unsigned N2     = M - 1 - N1;
  localparam int unsigned B      = 1 << (N2 - 1);
  localparam int unsigned NRUNS  = 6;
  localparam real         TOL    = 4.0 + $sqrt(real'(N));  // allowed error, output LSBs

  `include "tb_fht_common.svh"

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_rfft = 0, in_ready, out_valid, busy, done;
  logic [DW-1:0] in_data = '0, out_data;
  logic [M-1:0]  out_index;
  logic [$clog2(2*M+1)-1:0] out_exp;

  always #5 clk = ~clk;

  fht_processor #(.N_POINTS(N), .N_PB(NPB), .DATA_W(DW)) dut (.*);

  int checks = 0, failures = 0;
  int cnt_prelim = 0, cnt_type_a = 0, cnt_type_b = 0, cnt_swap = 0, cnt_cross = 0;
  int cnt_shift0 = 0, cnt_shift1 = 0, cnt_shift2 = 0, cnt_rfft_a = 0;
  int compute_cycles = 0;

  // mechanism counters, observed inside the array
  always @(posedge clk) if (rst_n) begin
    if (dut.g_pb[1].u_pb.u_pe.valid_i) begin
      case (dut.g_pb[1].u_pb.u_pe.op_i.mode)
        fht_pkg::OP_PRELIM: cnt_prelim++;
        fht_pkg::OP_TYPE_A: cnt_type_a++;
        fht_pkg::OP_RFFT_A: cnt_rfft_a++;
        default:            cnt_type_b++;
      endcase
      if (dut.g_pb[1].u_pb.u_pe.op_i.swap) cnt_swap++;
    end
    if (dut.g_pb[0].u_pb.link1_valid) cnt_cross++;   // from block NPB/2
    if (dut.u_ctrl.state == 2'd1) compute_cycles++;
  end

  real    x  [N];
  real    ref_h [N];
  logic [DW-1:0] xs [N];

  task automatic run_one(int kind, bit rfft);
    int got = 0;
    real err, maxerr = 0.0;
    int start_cycles;
    int unsigned expo;
    make_input(kind, xs);
    for (int n = 0; n < N; n++) x[n] = real'($signed(xs[n]));
    if (rfft) rdft(x, ref_h); else dht(x, ref_h);
    start_cycles = compute_cycles;
    // load
    for (int n = 0; n < N; n++) begin
      in_valid <= 1'b1; in_data <= xs[n]; in_rfft <= rfft;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 1'b0;
    // results
    while (got < N) begin
      @(posedge clk);
      if (out_valid) begin
        expo = 32'(out_exp);
        err = real'($signed(out_data)) * real'(1 << expo) - ref_h[out_index];
        if (err < 0) err = -err;
        err = err / real'(1 << expo);
        if (err > maxerr) maxerr = err;
        checks++;
        if (out_index != M'(got) || err > TOL) begin
          failures++;
          if (failures < 10)
            $display("run %0d: H[%0d] got %0d * 2^%0d, expected %f", kind, out_index,
                     int'($signed(out_data)), expo, ref_h[out_index]);
        end
        got++;
      end
    end
    $display("%s run %0d (input kind %0d): exponent %0d, max error %f LSB, compute %0d cycles",
             rfft ? "RFFT" : "FHT ", kind, kind, expo, maxerr, compute_cycles - start_cycles);
    checks++;
    if (compute_cycles - start_cycles != int'(M * (B + 7))) begin
      failures++;
      $display("latency %0d, expected %0d", compute_cycles - start_cycles, M * (B + 7));
    end
    @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("still busy after the last result"); end
  endtask

  // count each scaling choice taken at a stage start
  always @(posedge clk) if (rst_n && dut.u_ctrl.rd_en && dut.u_ctrl.cyc == 0) begin
    case (dut.u_ctrl.shift)
      2'd0: cnt_shift0++;
      2'd1: cnt_shift1++;
      default: cnt_shift2++;
    endcase
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int r = 0; r < 2 * NRUNS; r++) run_one(r % NRUNS, r >= NRUNS);
    $display("mechanisms: prelim %0d typeA %0d rfftA %0d typeB %0d swap %0d cross %0d shift0 %0d shift1 %0d shift2 %0d",
             cnt_prelim, cnt_type_a, cnt_rfft_a, cnt_type_b, cnt_swap, cnt_cross, cnt_shift0, cnt_shift1, cnt_shift2);
    checks += 9;
    if (cnt_rfft_a == 0) failures++;
    if (cnt_prelim == 0) failures++;
    if (cnt_type_a == 0) failures++;
    if (cnt_type_b == 0) failures++;
    if (cnt_swap   == 0) failures++;
    if (cnt_cross  == 0) failures++;
    if (cnt_shift0 == 0) failures++;
    if (cnt_shift1 == 0) failures++;
    if (cnt_shift2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * NRUNS * (3 * N + M * (B + 7) + 20) + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
