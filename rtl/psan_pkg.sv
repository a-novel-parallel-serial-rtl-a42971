// psan_pkg: widths, constants and the weight table shared by the PSAN
// (Parallel-Serial Architecture for Neural networks) modules.
//
// The data widths are those of the reference 2-6-1 implementation: 8-bit
// inputs and weights, 8x8=16-bit products, a 12-bit activation-function
// input taken from the accumulator MSBs, and an 8-bit activation output.
// All values are two's-complement signed.
//
// The network is trained off-line and its weights are constants of the
// hardware. The trained values of the reference network are not public, so
// psan_weight() below defines a fixed, reproducible set instead: a 32-bit
// integer hash of (layer, output, input), folded into the signed range
// [-64, 63]. Replacing this one function (or the ROM contents derived
// from it) with real trained weights is all a user has to change.
package psan_pkg;

  localparam int unsigned DATA_W   = 8;   // layer input / AF output width
  localparam int unsigned WEIGHT_W = 8;   // ROM width
  localparam int unsigned PROD_W   = DATA_W + WEIGHT_W;  // 16-bit product
  localparam int unsigned AF_IN_W  = 12;  // AF input: accumulator MSBs
  localparam int unsigned AF_OUT_W = DATA_W;

  // Constant fed on the offset input (input index 0 of every layer). It
  // stands for the value 1.0, the largest positive 8-bit value.
  localparam logic signed [DATA_W-1:0] OFFSET_VAL = 8'sd127;

  typedef logic signed [DATA_W-1:0]   data_t;
  typedef logic signed [WEIGHT_W-1:0] weight_t;
  typedef logic signed [PROD_W-1:0]   prod_t;

  // Weight of input `i` (0 = offset) of output `o` in layer `layer`
  // (1 = first layer). Pure function of its arguments, usable in constant
  // expressions. With k = layer*65536 + o*256 + i (32 bits, mod 2^32):
  //   k ^= k>>16; k *= 0x7feb352d; k ^= k>>15; k *= 0x846ca68b; k ^= k>>16;
  //   weight = k[6:0] - 64          (signed, in [-64, 63])
  function automatic weight_t psan_weight(input int unsigned layer,
                                          input int unsigned o,
                                          input int unsigned i);
    logic [31:0] k;
    k = 32'(layer * 65536 + o * 256 + i);
    k = k ^ (k >> 16);
    k = k * 32'h7feb352d;
    k = k ^ (k >> 15);
    k = k * 32'h846ca68b;
    k = k ^ (k >> 16);
    return weight_t'(int'({25'd0, k[6:0]}) - 64);
  endfunction

  // Ceiling division, used for t_n = ceil(n_i / P).
  function automatic int unsigned cdiv(input int unsigned a, input int unsigned b);
    return (a + b - 1) / b;
  endfunction

  // ---------------------------------------------------------------------
  // Layer sizing, evaluated at elaboration. ni counts the offset input,
  // t is the required number of clocks per output vector.
  // ---------------------------------------------------------------------

  // Clocks a neuron needs for one output: t_n = ceil(ni / P).
  function automatic int unsigned psan_tn(input int unsigned ni, input int unsigned p);
    return cdiv(ni, p);
  endfunction

  // Neurons needed to finish no outputs within t clocks:
  // N_n = ceil(no / floor(t / t_n)). If t < t_n no number of neurons
  // suffices; no is returned (the layer then simply runs slower).
  function automatic int unsigned psan_neurons(input int unsigned ni, input int unsigned no,
                                               input int unsigned p, input int unsigned t);
    int unsigned per;
    per = t / psan_tn(ni, p);
    return (per == 0) ? no : cdiv(no, per);
  endfunction

  // Reuses of each neuron per vector: S = ceil(no / N_n).
  function automatic int unsigned psan_reuse(input int unsigned no, input int unsigned nn);
    return cdiv(no, nn);
  endfunction

  // Redundant multiplications per vector: R_t = P*N_n*t - ni*no.
  function automatic int psan_redundancy(input int unsigned ni, input int unsigned no,
                                         input int unsigned p, input int unsigned nn,
                                         input int unsigned t);
    return int'(p * nn * t) - int'(ni * no);
  endfunction

  // Multipliers per neuron with the fewest redundant multiplications for a
  // required time t. Starts from the smallest P that can meet t,
  // P0 = ceil(ni/t), and tries larger P up to ni. A P that needs as many
  // neurons as the last one considered only adds multipliers and is
  // skipped; the search stops when S would exceed no. Ties keep the smaller
  // P.
  function automatic int unsigned psan_opt_p(input int unsigned ni, input int unsigned no,
                                             input int unsigned t);
    int unsigned p_opt, nn_prev, nn, s;
    int          r_opt, r;
    p_opt   = cdiv(ni, t);
    nn_prev = psan_neurons(ni, no, p_opt, t);
    if (psan_reuse(no, nn_prev) > no) return p_opt;
    r_opt   = psan_redundancy(ni, no, p_opt, nn_prev, t);
    for (int unsigned p = p_opt + 1; p <= ni; p++) begin
      nn = psan_neurons(ni, no, p, t);
      if (nn == nn_prev) continue;
      s = psan_reuse(no, nn);
      if (s > no) break;
      r = psan_redundancy(ni, no, p, nn, t);
      if (r < r_opt) begin
        r_opt = r;
        p_opt = p;
      end
      nn_prev = nn;
    end
    return p_opt;
  endfunction

endpackage
