// psan_layer: one layer of a Parallel-Serial Architecture neural network.
//
// The layer computes NO outputs from NI inputs (input 0 is the offset
// constant) with NN neurons of P multipliers each; every neuron is used S
// times per input vector, so one vector takes t_c = S * ceil(NI/P) clocks
// and the layer holds P*NN multipliers.
//
// Input side: input beats of P words enter a FIMFO (psan_fimfo), which
// replays each vector of t_n = ceil(NI/P) beats S times. Its beat and
// repetition counters are the layer's sequencer: they address the weight
// ROMs and mark the accumulator Load. With S=1 the FIMFO is a plain FIFO.
//
// Neurons: all NN neurons see the same beat and run in lock step; at the end
// of pass s neuron j holds output o = s*NN + j. Results with o >= NO
// (padding when NN does not divide NO) are dropped.
//
// Activation functions: the layer has min(NN, NEXT_P) of them. Normally
// (NEXT_P >= NN) each neuron has its own psan_af. When the next stage takes
// fewer words per beat than there are neurons, the 12-bit AF inputs are
// collected instead and NEXT_P AFs sit at the converter output, where the
// words are already time-multiplexed.
//
// Output side: AF results are written into a collection register; when the
// last pass is written the whole vector is handed to a psan_serializer that
// re-formats it for the next stage (NEXT_P words per beat, offset constant
// in front when NEXT_OFFSET=1). This is the layer-to-layer data format
// conversion, kept inside the sending layer.
//
// Flow control: stb/ack on both ports. If a pass result is due while the
// collection register still holds an un-sent vector, the whole layer (FIMFO
// read, both neuron pipeline stages) stalls for that cycle.
// Latency: the last beat of a vector leaves the FIMFO in cycle c; its
// result is in the collection register after c+2 and the first output beat
// is offered from c+3.
// The FIMFO input buffer, the P/S reuse scheme, the conversion inside the
// sending layer and the min(NN, NEXT_P) AF count follow the architecture;
// the pipeline depth, the buffer depth and the collection/stall scheme are
// this design's choices.
module psan_layer
  import psan_pkg::*;
#(
  parameter int unsigned LAYER       = 1,
  parameter int unsigned NI          = 2,
  parameter int unsigned NO          = 5,
  parameter int unsigned P           = 2,
  parameter int unsigned S           = 3,
  parameter int unsigned NN          = 2,
  parameter int unsigned ACC_W       = 17,
  parameter int unsigned NEXT_P      = 2,
  parameter int unsigned NEXT_OFFSET = 1,
  localparam int unsigned TN         = (NI + P - 1) / P,
  localparam int unsigned KW         = (TN > 2) ? $clog2(TN) : 1,
  localparam int unsigned RW         = (S > 2) ? $clog2(S) : 1,
  // Room for two whole input vectors: one being replayed, one arriving.
  localparam int unsigned FDEPTH     = (TN > 1) ? (1 << $clog2(2 * TN)) : 2,
  // Activation functions: min(NN, NEXT_P) of them. With fewer output words
  // per beat than neurons they sit after the output converter.
  localparam bit          AF_AT_OUT  = (NEXT_P < NN),
  localparam int unsigned CW         = AF_AT_OUT ? AF_IN_W : DATA_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_stb,
  output logic                          in_ack,
  input  logic [P-1:0][DATA_W-1:0]      in_data,
  output logic                          out_stb,
  input  logic                          out_ack,
  output logic [NEXT_P-1:0][DATA_W-1:0] out_data,
  output logic                          out_last
);

  if (P < 1 || P > NI) begin : g_chk_p
    $error("psan_layer: need 1 <= P <= NI");
  end
  if (S < 1 || S > NO) begin : g_chk_s
    $error("psan_layer: need 1 <= S <= NO");
  end
  if (NN * S < NO) begin : g_chk_nn
    $error("psan_layer: NN*S must cover NO outputs");
  end

  // ---------------- input FIMFO / sequencer ----------------
  logic                     f_stb;
  logic [P*DATA_W-1:0]      f_data;
  logic [KW-1:0]            f_beat;
  logic [RW-1:0]            f_rep;
  logic                     adv;     // layer advances this cycle

  psan_fimfo #(.WIDTH(P * DATA_W), .DEPTH(FDEPTH), .PKT(TN), .REPEAT(S)) u_fimfo (
    .clk, .rst_n,
    .in_stb, .in_ack, .in_data(in_data),
    .out_stb(f_stb), .out_ack(adv), .out_data(f_data),
    .out_beat(f_beat), .out_rep(f_rep)
  );

  // ---------------- neurons and activation functions ----------------
  logic                    n_valid [NN];
  logic [RW-1:0]           n_pass  [NN];
  logic signed [ACC_W-1:0] n_acc   [NN];
  logic [CW-1:0]           res     [NN];   // per-neuron result word

  for (genvar j = 0; j < NN; j++) begin : g_neuron
    psan_neuron #(
      .LAYER(LAYER), .NI(NI), .NO(NO), .P(P), .S(S), .NN(NN),
      .NEURON(j), .ACC_W(ACC_W)
    ) u_neuron (
      .clk, .rst_n,
      .en       (adv),
      .in_valid (f_stb),
      .in_data  (f_data),
      .in_beat  (f_beat),
      .in_pass  (f_rep),
      .out_valid(n_valid[j]),
      .out_pass (n_pass[j]),
      .out_acc  (n_acc[j])
    );

    if (AF_AT_OUT) begin : g_raw
      // activation applied after the output converter: keep the AF input
      assign res[j] = n_acc[j][ACC_W-1 -: AF_IN_W];
    end else begin : g_af
      psan_af #(.ACC_W(ACC_W), .AF_IN_W(AF_IN_W), .OUT_W(DATA_W)) u_af (
        .acc(n_acc[j]),
        .y  (res[j])
      );
    end
  end

  // ---------------- output collection ----------------
  logic [NO-1:0][CW-1:0]     collect;
  logic                      collect_full;
  logic                      xfer;      // collection register handed to serializer
  logic                      wb;        // a pass result is due
  logic                      wb_last;
  logic                      ser_ack;

  assign wb      = n_valid[0];
  assign wb_last = (n_pass[0] == RW'(S - 1));
  assign xfer    = collect_full && ser_ack;
  assign adv     = !(wb && collect_full && !xfer);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      collect      <= '0;
      collect_full <= 1'b0;
    end else begin
      // output o comes from neuron o % NN in pass o / NN
      if (wb && adv) begin
        for (int unsigned o = 0; o < NO; o++)
          if (int'(n_pass[0]) == int'(o / NN)) collect[o] <= res[o % NN];
      end
      if (wb && adv && wb_last) collect_full <= 1'b1;
      else if (xfer)            collect_full <= 1'b0;
    end
  end

  // A pass result is only written when the collection register is free or
  // is being handed over in the same clock.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    wb && adv |-> !collect_full || xfer);

  logic [NEXT_P-1:0][CW-1:0] ser_data;

  psan_serializer #(.NV(NO), .OFFSET_EN(NEXT_OFFSET), .OUT_P(NEXT_P), .W(CW)) u_ser (
    .clk, .rst_n,
    .load_stb(collect_full),
    .load_ack(ser_ack),
    .load_vec(collect),
    .out_stb, .out_ack,
    .out_data(ser_data),
    .out_last
  );

  for (genvar q = 0; q < NEXT_P; q++) begin : g_out
    if (AF_AT_OUT) begin : g_af
      // the offset word (127) and padding (0) pass the AF unchanged
      psan_af #(.ACC_W(AF_IN_W), .AF_IN_W(AF_IN_W), .OUT_W(DATA_W)) u_af (
        .acc(ser_data[q]),
        .y  (out_data[q])
      );
    end else begin : g_wire
      assign out_data[q] = ser_data[q];
    end
  end

endmodule
