// tb_fht_dual_port_ram: self-checking test of the dual-port data memory.
//
// Drives random reads and half-word writes on both ports at once (never two
// writes to one word) and checks every read, one cycle after its address,
// against a model memory, including the old-data result of a read that
// meets a write to the same word.
module tb_fht_dual_port_ram;
  localparam int DW = 16;
  localparam int DEPTH = 64;
  localparam int AW = $clog2(DEPTH);
  localparam int NOPS = 4000;

  logic clk = 0;
  always #5 clk = ~clk;

  logic a_en = 0, b_en = 0;
  logic [1:0] a_we = 0, b_we = 0;
  logic [AW-1:0] a_addr = 0, b_addr = 0;
  logic [2*DW-1:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;

  fht_dual_port_ram #(.DATA_W(DW), .DEPTH(DEPTH)) dut (.*);

  logic [2*DW-1:0] model [DEPTH];
  int checks = 0, failures = 0;
  logic exp_a_v = 0, exp_b_v = 0;
  logic [2*DW-1:0] exp_a, exp_b;

  function automatic logic [2*DW-1:0] merge(logic [2*DW-1:0] old, logic [2*DW-1:0] w,
                                            logic [1:0] we);
    return {we[1] ? w[2*DW-1:DW] : old[2*DW-1:DW], we[0] ? w[DW-1:0] : old[DW-1:0]};
  endfunction

  initial begin
    // fill the memory through both ports
    for (int i = 0; i < DEPTH; i += 2) begin
      a_en <= 1; a_we <= 2'b11; a_addr <= AW'(i);     a_wdata <= $urandom;
      b_en <= 1; b_we <= 2'b11; b_addr <= AW'(i + 1); b_wdata <= $urandom;
      @(posedge clk);
      model[i] = a_wdata; model[i+1] = b_wdata;
    end
    for (int n = 0; n < NOPS; n++) begin
      logic ae, be;
      logic [1:0] aw, bw;
      logic [AW-1:0] aa, ba;
      logic [2*DW-1:0] ad, bd;
      ae = 1'($urandom_range(0, 3) != 0); be = 1'($urandom_range(0, 3) != 0);
      aw = ($urandom_range(0, 1) != 0) ? 2'($urandom) : 2'b00;
      bw = ($urandom_range(0, 1) != 0) ? 2'($urandom) : 2'b00;
      aa = AW'($urandom); ba = AW'($urandom);
      if (aa == ba && aw != 0 && bw != 0) bw = 2'b00;
      ad = $urandom; bd = $urandom;
      a_en <= ae; a_we <= aw; a_addr <= aa; a_wdata <= ad;
      b_en <= be; b_we <= bw; b_addr <= ba; b_wdata <= bd;
      @(posedge clk);
      // reads return the contents before this cycle's writes
      exp_a_v = ae; exp_a = model[aa];
      exp_b_v = be; exp_b = model[ba];
      if (ae && aw != 0) model[aa] = merge(model[aa], ad, aw);
      if (be && bw != 0) model[ba] = merge(model[ba], bd, bw);
      #1;
      if (exp_a_v) begin
        checks++;
        if (a_rdata !== exp_a) begin failures++; $display("A read %h exp %h", a_rdata, exp_a); end
      end
      if (exp_b_v) begin
        checks++;
        if (b_rdata !== exp_b) begin failures++; $display("B read %h exp %h", b_rdata, exp_b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NOPS + DEPTH + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
