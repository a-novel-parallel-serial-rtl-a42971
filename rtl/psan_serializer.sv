// psan_serializer: data sequence converter between PSAN stages.
//
// Takes a whole vector of NV words at once (the parallel side), puts the
// constant OFFSET_VAL in front of it when OFFSET_EN is set (the offset input
// of the next layer), and hands the NV+OFFSET_EN words on as beats of OUT_P
// words: beat b carries words b*OUT_P .. b*OUT_P+OUT_P-1, the tail padded
// with zeros. One vector thus leaves as ceil((NV+OFFSET_EN)/OUT_P) beats, in
// the order the next layer's multipliers need them (multiplier p takes word
// p of each beat). With OUT_P=1 it is a parallel-in serial-out register;
// with OUT_P = NV+OFFSET_EN it passes whole vectors. Words are W bits wide
// (8-bit activations by default; a layer that applies its activation
// functions after this converter sends 12-bit pre-activation words).
//
// It holds one vector. A new vector is accepted (load_ack) when the register
// is empty or while its last beat is being taken, so back-to-back vectors
// flow without a gap. Both sides use stb/ack: a transfer happens in a cycle
// in which both are high. Beats are registered outputs of a word mux.
// The exact register organisation is this design's choice; the source
// architecture names only the function (SIPO/PISO conversion between
// layers, done inside the sending layer).
module psan_serializer
  import psan_pkg::*;
#(
  parameter int unsigned NV        = 5,
  parameter int unsigned OFFSET_EN = 1,
  parameter int unsigned OUT_P     = 2,
  parameter int unsigned W         = DATA_W,       // word width
  parameter logic signed [W-1:0] OFFSET_C = W'(OFFSET_VAL),
  localparam int unsigned NW       = NV + OFFSET_EN,
  localparam int unsigned NB       = (NW + OUT_P - 1) / OUT_P,
  localparam int unsigned BW       = (NB > 2) ? $clog2(NB) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         load_stb,
  output logic                         load_ack,
  input  logic [NV-1:0][W-1:0]         load_vec,
  output logic                         out_stb,
  input  logic                         out_ack,
  output logic [OUT_P-1:0][W-1:0]      out_data,
  output logic                         out_last   // last beat of the vector
);

  logic [NB*OUT_P-1:0][W-1:0]      words;   // padded vector being sent
  logic [NB*OUT_P-1:0][W-1:0]      words_d;
  logic                            full;
  logic [BW-1:0]                   beat;
  logic                            last_go;

  assign out_stb  = full;
  assign out_last = (beat == BW'(NB - 1));
  assign last_go  = full && out_ack && out_last;
  assign load_ack = !full || last_go;

  always_comb begin
    words_d = '0;
    if (OFFSET_EN != 0) words_d[0] = OFFSET_C;
    for (int unsigned n = 0; n < NV; n++) words_d[n + OFFSET_EN] = load_vec[n];
  end

  always_comb begin
    for (int unsigned p = 0; p < OUT_P; p++)
      out_data[p] = words[int'(beat) * OUT_P + p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full  <= 1'b0;
      beat  <= '0;
      words <= '0;
    end else begin
      if (load_stb && load_ack) begin
        words <= words_d;
        full  <= 1'b1;
        beat  <= '0;
      end else if (full && out_ack) begin
        if (out_last) begin
          full <= 1'b0;
          beat <= '0;
        end else begin
          beat <= beat + 1'b1;
        end
      end
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_stb && !out_ack |=> out_stb && $stable(out_data));

endmodule
