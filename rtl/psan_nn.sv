// psan_nn: a 2-6-1 feed-forward neural network in the Parallel-Serial
// Architecture (PSAN), the top of this design.
//
// Node counts include the offset input: N0=2 (one variable input plus the
// offset), N1=6 (five hidden neurons plus the offset), N2=1 output. The
// defaults are the balanced design for a required calculation time of t=3
// clocks per vector:
//   layer 1: NI=2, NO=5, P=2, S=3, NN=2  -> t_c = 3*1 = 3, 4 multipliers
//   layer 2: NI=6, NO=1, P=2, S=1, NN=1  -> t_c = 1*3 = 3, 2 multipliers
// so both layers are busy every clock and a new input vector can be taken
// every 3 clocks. These numbers are not typed in: from the required time T
// each layer's P is the least-redundant choice (psan_pkg::psan_opt_p), N_n
// the neurons needed to finish within T and S = ceil(n_o / N_n). Any of
// them can be overridden; T=4 alone gives layer 1 (S, P, N_n) = (2, 1, 3)
// with t_c = 4.
//
// Structure: input converter (psan_serializer: parallel input vector ->
// offset + inputs as beats of P1 words) -> layer 1 (psan_layer, its output
// re-formatted into beats of P2 words with the offset in front) -> layer 2
// (whole output vector in one beat). Each layer buffers its input in a
// FIFO/FIMFO, so the stb/ack handshake never runs through more than one
// layer.
//
// Ports: in_x is the parallel input vector (N0-1 signed 8-bit words),
// out_y the output vector (N2 signed 8-bit words); both sides
// use stb/ack (transfer when both are high). Latency at the defaults: 15
// clocks from an input vector being accepted to its result being offered,
// on an empty pipeline.
// Accumulator widths 17 and 19 bits are those of the reference
// implementation for the default configuration.
module psan_nn
  import psan_pkg::*;
#(
  parameter int unsigned N0     = 2,
  parameter int unsigned N1     = 6,
  parameter int unsigned N2     = 1,
  parameter int unsigned T      = 3,    // required clocks per output vector
  parameter int unsigned P1     = psan_opt_p(N0, N1 - 1, T),
  parameter int unsigned NN1    = psan_neurons(N0, N1 - 1, P1, T),
  parameter int unsigned S1     = psan_reuse(N1 - 1, NN1),
  parameter int unsigned ACC1_W = 17,
  parameter int unsigned P2     = psan_opt_p(N1, N2, T),
  parameter int unsigned NN2    = psan_neurons(N1, N2, P2, T),
  parameter int unsigned S2     = psan_reuse(N2, NN2),
  parameter int unsigned ACC2_W = 19
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_stb,
  output logic                        in_ack,
  input  logic [N0-2:0][DATA_W-1:0]   in_x,
  output logic                        out_stb,
  input  logic                        out_ack,
  output logic [N2-1:0][DATA_W-1:0]   out_y
);

  logic                    c_stb, c_ack;
  logic [P1-1:0][DATA_W-1:0] c_data;
  logic                    h_stb, h_ack;
  logic [P2-1:0][DATA_W-1:0] h_data;

  // Input interface: parallel input vector -> beats for layer 1.
  psan_serializer #(.NV(N0 - 1), .OFFSET_EN(1), .OUT_P(P1)) u_in_conv (
    .clk, .rst_n,
    .load_stb(in_stb), .load_ack(in_ack), .load_vec(in_x),
    .out_stb(c_stb), .out_ack(c_ack), .out_data(c_data), .out_last()
  );

  psan_layer #(
    .LAYER(1), .NI(N0), .NO(N1 - 1), .P(P1), .S(S1), .NN(NN1), .ACC_W(ACC1_W),
    .NEXT_P(P2), .NEXT_OFFSET(1)
  ) u_layer1 (
    .clk, .rst_n,
    .in_stb(c_stb), .in_ack(c_ack), .in_data(c_data),
    .out_stb(h_stb), .out_ack(h_ack), .out_data(h_data), .out_last()
  );

  psan_layer #(
    .LAYER(2), .NI(N1), .NO(N2), .P(P2), .S(S2), .NN(NN2), .ACC_W(ACC2_W),
    .NEXT_P(N2), .NEXT_OFFSET(0)
  ) u_layer2 (
    .clk, .rst_n,
    .in_stb(h_stb), .in_ack(h_ack), .in_data(h_data),
    .out_stb, .out_ack, .out_data(out_y), .out_last()
  );

endmodule
