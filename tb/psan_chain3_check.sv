// psan_chain3_check: builds a three-layer network of equal layers (3 inputs
// plus the offset in, 3 outputs per layer) from three psan_layer instances
// with the same (P, S, N_n) and checks it. Every layer passes beats of P
// words to the next one, whose FIMFO is P words wide; the last layer hands
// out its whole 3-word result in one beat. Phase 1 offers an input vector
// every clock: outputs must match the reference model and, in steady state,
// leave every TC = S*ceil(4/P) clocks. Phase 2 offers an input every T
// clocks (the required calculation time): outputs must leave every T clocks.
// Reports its counts on `checks` / `failures` and raises `done`.
module psan_chain3_check
  import psan_pkg::*;
  import psan_ref_pkg::*;
#(
  parameter int P = 1, S = 1, NN = 3,
  parameter int T = 4,
  parameter int NVEC = 60
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int NI = 4, NO = 3, ACC_W = 18;
  localparam int TC = S * ((NI + P - 1) / P);

  logic                    in_stb, in_ack, out_stb, out_ack;
  logic [NI-2:0][DATA_W-1:0] in_x;
  logic [NO-1:0][DATA_W-1:0] out_y;
  logic                    b_stb [3];
  logic                    b_ack [3];
  logic [P-1:0][DATA_W-1:0] b_dat [3];

  psan_serializer #(.NV(NI - 1), .OFFSET_EN(1), .OUT_P(P)) u_conv (
    .clk, .rst_n, .load_stb(in_stb), .load_ack(in_ack), .load_vec(in_x),
    .out_stb(b_stb[0]), .out_ack(b_ack[0]), .out_data(b_dat[0]), .out_last());
  for (genvar l = 0; l < 2; l++) begin : g_l
    psan_layer #(.LAYER(l + 1), .NI(NI), .NO(NO), .P(P), .S(S), .NN(NN), .ACC_W(ACC_W),
                 .NEXT_P(P), .NEXT_OFFSET(1)) u (
      .clk, .rst_n, .in_stb(b_stb[l]), .in_ack(b_ack[l]), .in_data(b_dat[l]),
      .out_stb(b_stb[l + 1]), .out_ack(b_ack[l + 1]), .out_data(b_dat[l + 1]), .out_last());
  end
  psan_layer #(.LAYER(3), .NI(NI), .NO(NO), .P(P), .S(S), .NN(NN), .ACC_W(ACC_W),
               .NEXT_P(NO), .NEXT_OFFSET(0)) u_l3 (
    .clk, .rst_n, .in_stb(b_stb[2]), .in_ack(b_ack[2]), .in_data(b_dat[2]),
    .out_stb, .out_ack, .out_data(out_y), .out_last());

  initial checks = 0;
  initial failures = 0;
  vec_t exp_q[$];
  int cyc = 0, last = -1, n_out = 0, phase = 0, n_rate = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign out_ack = 1'b1;

  always @(posedge clk) if (rst_n && out_stb) begin
    vec_t e;
    e = exp_q.pop_front();
    for (int o = 0; o < NO; o++) begin
      checks++;
      if (int'($signed(out_y[o])) != e[o]) begin
        failures++;
        $display("chain P=%0d S=%0d: vector %0d output %0d got %0d expected %0d",
                 P, S, n_out, o, $signed(out_y[o]), e[o]);
      end
    end
    if ((phase == 1 && n_out >= 4 && n_out < NVEC) || (phase == 2 && n_out >= NVEC + 2)) begin
      checks++;
      n_rate++;
      if (cyc - last != (phase == 1 ? TC : T)) begin
        failures++;
        $display("chain P=%0d S=%0d phase %0d: output interval %0d", P, S, phase, cyc - last);
      end
    end
    last = cyc;
    n_out++;
  end

  task automatic send();
    vec_t v;
    v = {};
    for (int i = 0; i < NI - 1; i++) begin
      v.push_back(int'($urandom_range(255)) - 128);
      in_x[i] = DATA_W'(v[i]);
    end
    for (int l = 1; l <= 3; l++) begin
      v.push_front(int'(OFFSET_VAL));
      v = ref_layer(l, NO, ACC_W, v);
    end
    exp_q.push_back(v);
    in_stb = 1'b1;
    do @(posedge clk); while (!in_ack);
    #1 in_stb = 1'b0;
  endtask

  initial begin
    done = 1'b0;
    in_stb = 1'b0; in_x = '0;
    @(posedge rst_n);
    #1 phase = 1;
    for (int n = 0; n < NVEC; n++) send();
    while (exp_q.size() != 0) @(posedge clk);
    #1 phase = 2;
    for (int n = 0; n < NVEC; n++) begin
      int c0;
      c0 = cyc;
      send();
      while (cyc - c0 < T) begin @(posedge clk); #1; end
    end
    while (exp_q.size() != 0) @(posedge clk);
    #1;
    checks++;
    if (n_out != 2 * NVEC || n_rate == 0) begin
      failures++;
      $display("chain P=%0d S=%0d: %0d outputs, %0d rate checks", P, S, n_out, n_rate);
    end
    done = 1'b1;
  end
endmodule
