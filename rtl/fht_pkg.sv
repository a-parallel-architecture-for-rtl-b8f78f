// fht_pkg: types, constants and index arithmetic shared by the parallel
// radix-2 fast Hartley transform (FHT) processor.
//
// The transform is computed with the double FHT butterfly on "PN pairs": every
// stored word holds two real values, the P part (index k) and its N partner
// (L/2-k for the input of a size-L stage, L-k for its output; L/4 resp. L/2 when
// k = 0). A pair is named by an identifier whose K field is derived from the
// pair's "D class" member (k = 0 or k = (4p+3)*2^q): its lowest set bit is
// deleted and the remaining bits are bit-reversed. With this naming the two
// pairs entering a butterfly differ only in the identifier's top bit and the
// outputs are named by a one-bit left rotation, i.e. a perfect shuffle, so the
// whole transform runs on an indirect binary hypercube of processor blocks.
//
// The functions below are pure combinational index maps; they work on
// 32-bit integers with the field widths passed as arguments.
//
// The D/C classes, the identifier rule and the perfect shuffle follow the
// document; which output of a butterfly gets rotation bit 0, the twiddle
// index formula derived from it and the output placement of the real-valued
// FFT version were worked out for this design and checked against direct
// transforms.
package fht_pkg;

  // Pipeline length of one processing step, from operand fetch to result write
  // (the document's P1 = 7 cycles).
  localparam int unsigned PIPE_LEN = 7;

  // Operation performed by a processor element for one butterfly slot.
  typedef enum logic [1:0] {
    OP_PRELIM = 2'd0,  // first stage: two independent 2-point butterflies
    OP_TYPE_A = 2'd1,  // k = 0 double butterfly, no multiplication
    OP_TYPE_B = 2'd2,  // 0 < k < L/4 double butterfly with cos/sin twiddles
    OP_RFFT_A = 2'd3   // k = 0 butterfly of the real-valued FFT version
  } pe_mode_e;

  // Per-slot control travelling with the operands into a processor element.
  typedef struct packed {
    pe_mode_e    mode;
    logic        swap;   // exchange the two output pairs (see fht_pe)
    logic [1:0]  shift;  // block-floating-point pre-scale, 0..2 bits right
  } pe_op_t;

  // Reverse the lowest `bits` bits of v.
  function automatic int unsigned bit_reverse(int unsigned v, int unsigned bits);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < 32; i++)
      if (i < bits) r |= ((v >> i) & 1) << (bits - 1 - i);
    return r;
  endfunction

  // Lowest set bit of v (0 for v = 0).
  function automatic int unsigned low_bit(int unsigned v);
    return v & (~v + 1);
  endfunction

  // True when a nonzero k is of the form (4p+3)*2^q (the D class); k = 0 is D too.
  function automatic bit is_d_class(int unsigned k);
    int unsigned lb;
    if (k == 0) return 1'b1;
    lb = low_bit(k);
    return ((k & (lb << 1)) != 0);
  endfunction

  // D value -> reduced value (its lowest set bit deleted from the binary string).
  function automatic int unsigned d_reduce(int unsigned d);
    if (d == 0) return 0;
    return (d - low_bit(d)) >> 1;
  endfunction

  // Inverse of d_reduce: reinsert a '1' below the lowest set bit.
  function automatic int unsigned d_expand(int unsigned r);
    if (r == 0) return 0;
    return (r << 1) + low_bit(r);
  endfunction

  // Twiddle index k (angle 2*pi*k/2^s) of the butterfly at switch position j in
  // stage s (s >= 3). Only the lowest s-2 bits of j, the K field, matter.
  function automatic int unsigned twiddle_k(int unsigned j, int unsigned s);
    int unsigned kf, d, l4;
    kf = j & ((32'd1 << (s - 2)) - 1);
    d  = d_expand(bit_reverse(kf, s - 2));
    l4 = 32'd1 << (s - 2);
    return (d < l4) ? d : (2 * l4 - d);
  endfunction

  // Pair identifier that holds output index k of an N = 2^m_total point
  // transform after the last stage, which half of the pair holds it and
  // whether it is stored negated.
  //   FHT:  H[k] is the P half for k < N/2, the N half for k >= N/2.
  //   RFFT: output k (0 < k < N/2) is Re F(k) and output N-k is Im F(k).
  //         For k in class C the pair holds (Re F(k), Im F(k)); for k in
  //         class D it holds (-Im F(k), Re F(k)).
  function automatic int unsigned out_pair_id(int unsigned k, int unsigned m_total, bit rfft,
                                              output bit n_half, output bit neg);
    int unsigned n, kp, d;
    n   = 32'd1 << m_total;
    neg = 1'b0;
    if (k == 0 || k == n / 2) begin
      n_half = (k != 0);
      return 0;
    end
    kp = (k > n / 2) ? (n - k) : k;
    if (!rfft) begin
      n_half = (k > n / 2);
    end else if (k < n / 2) begin
      n_half = is_d_class(kp);            // real part
    end else begin
      n_half = !is_d_class(kp);           // imaginary part
      neg    = is_d_class(kp);
    end
    d = is_d_class(kp) ? kp : (n - kp);
    return bit_reverse(d_reduce(d), m_total - 1);
  endfunction

  // Storage position of input pair n (samples x[n], x[n+N/2]) before stage 1:
  // the one-bit right rotation of n over the m-bit identifier.
  function automatic int unsigned in_pair_pos(int unsigned n, int unsigned m);
    return (n >> 1) | ((n & 1) << (m - 1));
  endfunction

endpackage
