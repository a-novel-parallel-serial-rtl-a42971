// psan_fimfo: First-In Multiple-First-Out buffer.
//
// A FIFO whose write side is ordinary, but whose read side delivers every
// packet of PKT consecutive entries REPEAT times before moving on: for
// PKT=4, REPEAT=2 the input d00 d01 d02 d03 d10 ... leaves as
// d00 d01 d02 d03 d00 d01 d02 d03 d10 ... A PSAN layer with S > 1 uses it
// to present the same input vector once per reuse of its neurons; with
// REPEAT=1 it is a plain FIFO, the elastic buffer every layer keeps at its
// input so that the stb/ack chain stays inside one layer.
//
// How it works: the memory is a dual-port array addressed by a write
// pointer and by a packet base pointer plus a beat counter. After the last
// beat of a packet the beat counter returns to 0, which re-reads the packet
// from its base (the read address is "reloaded" with the packet start), and
// only after the REPEAT-th pass is the base advanced and the packet's space
// freed. out_beat / out_rep expose the beat counter and the repetition
// count, which a layer uses directly as its sequencer state.
//
// Interface: stb/ack handshakes on both sides; a word moves in a cycle in
// which stb and ack are both high. in_ack depends only on state; out_stb
// only on state. The read data is combinational from the array.
// Timing: a word written in cycle c can be read from cycle c+1.
// DEPTH must be a power of two, at least 2 and at least PKT.
// Design choices (not given by the source architecture): the pointer
// arithmetic, the exposed counters and the asynchronous active-low reset.
module psan_fimfo #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned DEPTH  = 4,
  parameter int unsigned PKT    = 1,
  parameter int unsigned REPEAT = 3,
  localparam int unsigned AW = (DEPTH > 2) ? $clog2(DEPTH) : 1,
  localparam int unsigned KW = (PKT > 2) ? $clog2(PKT) : 1,
  localparam int unsigned RW = (REPEAT > 2) ? $clog2(REPEAT) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_stb,
  output logic             in_ack,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_stb,
  input  logic             out_ack,
  output logic [WIDTH-1:0] out_data,
  output logic [KW-1:0]    out_beat,   // beat index within the packet
  output logic [RW-1:0]    out_rep     // which repetition of the packet
);

  if (DEPTH < 2 || (DEPTH & (DEPTH - 1)) != 0 || DEPTH < PKT) begin : g_chk_depth
    $error("psan_fimfo: DEPTH must be a power of two >= 2 and >= PKT");
  end

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, bp;       // write pointer, packet base pointer
  logic [AW:0]      used;         // entries held, including the packet being replayed
  logic [KW-1:0]    beat;
  logic [RW-1:0]    rep;
  logic [AW-1:0]    raddr;

  assign used     = wp - bp;
  assign in_ack   = used < (AW+1)'(DEPTH);
  assign out_stb  = used > (AW+1)'(beat);
  assign raddr    = bp[AW-1:0] + AW'(beat);
  assign out_data = mem[raddr];
  assign out_beat = beat;
  assign out_rep  = rep;

  always_ff @(posedge clk) begin
    if (in_stb && in_ack) mem[wp[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp   <= '0;
      bp   <= '0;
      beat <= '0;
      rep  <= '0;
    end else begin
      if (in_stb && in_ack) wp <= wp + 1'b1;
      if (out_stb && out_ack) begin
        if (beat == KW'(PKT - 1)) begin
          beat <= '0;
          if (rep == RW'(REPEAT - 1)) begin
            rep <= '0;
            bp  <= bp + (AW+1)'(PKT);
          end else begin
            rep <= rep + 1'b1;
          end
        end else begin
          beat <= beat + 1'b1;
        end
      end
    end
  end

  // Handshake rule: once offered, a word stays offered and unchanged until taken.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_stb && !out_ack |=> out_stb && $stable(out_data));

endmodule
