// psan_weight_rom: weight ROM feeding one multiplier of one PSAN neuron.
//
// A neuron with P multipliers has P of these ROMs. Multiplier MULT of neuron
// NEURON sees input indices MULT, MULT+P, MULT+2P, ... (one per clock,
// t_n = ceil(NI/P) clocks per neuron output), and the neuron is reused S
// times per output vector. The ROM therefore holds t_c = S*t_n words; the
// word at address  a = s*t_n + k  is the weight of input  i = k*P + MULT
// for output  o = s*NN + NEURON  of layer LAYER. Slots where i >= NI or
// o >= NO (the padding that makes a layer redundant) hold 0.
//
// The table is computed at elaboration from psan_pkg::psan_weight and is
// read combinationally, like a LUT ROM. The assignment of outputs to passes
// (o = s*NN + NEURON, so that one pass of all neurons yields consecutive
// outputs) is this design's choice; the source architecture only requires
// that pass s of a neuron uses that neuron's weights.
module psan_weight_rom
  import psan_pkg::*;
#(
  parameter int unsigned LAYER  = 1,
  parameter int unsigned NI     = 2,   // layer inputs, offset included
  parameter int unsigned NO     = 5,   // layer outputs
  parameter int unsigned P      = 2,   // multipliers per neuron
  parameter int unsigned S      = 3,   // reuses of each neuron per vector
  parameter int unsigned NN     = 2,   // neurons in the layer
  parameter int unsigned NEURON = 0,
  parameter int unsigned MULT   = 0,
  localparam int unsigned TN    = (NI + P - 1) / P,
  localparam int unsigned DEPTH = S * TN,
  localparam int unsigned AW    = (DEPTH > 2) ? $clog2(DEPTH) : 1
) (
  input  logic [AW-1:0] addr,
  output weight_t       weight
);

  typedef logic [DEPTH-1:0][WEIGHT_W-1:0] table_t;

  function automatic table_t build_table();
    table_t t;
    for (int unsigned s = 0; s < S; s++) begin
      for (int unsigned k = 0; k < TN; k++) begin
        int unsigned o, i;
        o = s * NN + NEURON;
        i = k * P + MULT;
        t[s * TN + k] = (o < NO && i < NI) ? psan_weight(LAYER, o, i) : '0;
      end
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_comb begin
    if (int'(addr) < int'(DEPTH)) weight = weight_t'(TABLE[addr]);
    else                          weight = '0;
  end

endmodule
