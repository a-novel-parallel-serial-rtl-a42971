// psan_neuron: one PSAN neuron with P multipliers, reused S times.
//
// Each clock the neuron takes P inputs (one beat), multiplies each by the
// weight its own ROM delivers for the current (pass, beat), adds the P
// products in an adder tree and accumulates the sum. t_n = ceil(NI/P) beats
// make one neuron output; the accumulator is loaded (not added to) on beat 0,
// as the Load column of the reference schedule shows. After the S-th pass
// the neuron has produced S different outputs of the same input vector
// (outputs NEURON, NEURON+NN, ..., see psan_weight_rom).
//
// Pipeline (this design's choice, two register stages):
//   stage 1: ROM read and P multiplications, products registered;
//   stage 2: adder tree plus accumulator (P two-input adders in all).
// A beat presented in cycle c reaches the accumulator at the end of c+1; the
// output of the last beat of a pass is valid (out_valid=1) in cycle c+2,
// together with out_pass, the pass it belongs to. `en` low freezes every
// register (a stall); in_valid low inserts an idle beat.
// Interface: in_data is P packed signed words, word p feeding multiplier p.
module psan_neuron
  import psan_pkg::*;
#(
  parameter int unsigned LAYER  = 1,
  parameter int unsigned NI     = 2,
  parameter int unsigned NO     = 5,
  parameter int unsigned P      = 2,
  parameter int unsigned S      = 3,
  parameter int unsigned NN     = 2,
  parameter int unsigned NEURON = 0,
  parameter int unsigned ACC_W  = 17,
  localparam int unsigned TN    = (NI + P - 1) / P,
  localparam int unsigned KW    = (TN > 2) ? $clog2(TN) : 1,
  localparam int unsigned RW    = (S > 2) ? $clog2(S) : 1,
  localparam int unsigned AW    = (S * TN > 2) ? $clog2(S * TN) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  input  logic                         in_valid,
  input  logic [P-1:0][DATA_W-1:0]     in_data,
  input  logic [KW-1:0]                in_beat,
  input  logic [RW-1:0]                in_pass,
  output logic                         out_valid,
  output logic [RW-1:0]                out_pass,
  output logic signed [ACC_W-1:0]      out_acc
);

  logic [AW-1:0] addr;
  weight_t       w [P];
  prod_t         prod_d [P];

  assign addr = AW'(in_pass) * AW'(TN) + AW'(in_beat);

  for (genvar p = 0; p < P; p++) begin : g_mult
    psan_weight_rom #(
      .LAYER(LAYER), .NI(NI), .NO(NO), .P(P), .S(S), .NN(NN),
      .NEURON(NEURON), .MULT(p)
    ) u_rom (
      .addr  (addr),
      .weight(w[p])
    );
    assign prod_d[p] = data_t'(in_data[p]) * w[p];
  end

  // Stage 1 registers
  prod_t         prod_q [P];
  logic          s1_valid, s1_load, s1_last;
  logic [RW-1:0] s1_pass;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_load  <= 1'b0;
      s1_last  <= 1'b0;
      s1_pass  <= '0;
      for (int p = 0; p < P; p++) prod_q[p] <= '0;
    end else if (en) begin
      s1_valid <= in_valid;
      s1_load  <= (in_beat == '0);
      s1_last  <= (in_beat == KW'(TN - 1));
      s1_pass  <= in_pass;
      for (int p = 0; p < P; p++) prod_q[p] <= prod_d[p];
    end
  end

  // Stage 2: adder tree and accumulator
  logic signed [ACC_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int p = 0; p < P; p++) sum += ACC_W'(prod_q[p]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_acc   <= '0;
      out_valid <= 1'b0;
      out_pass  <= '0;
    end else if (en) begin
      if (s1_valid) out_acc <= s1_load ? sum : out_acc + sum;
      out_valid <= s1_valid && s1_last;
      out_pass  <= s1_pass;
    end
  end

endmodule
