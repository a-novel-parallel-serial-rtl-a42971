// psan_nn_cfg_check: drives one psan_nn configuration and checks it.
// Phase 1 offers a new input vector every clock: outputs must match the
// reference model and, in steady state, leave every TC clocks, the larger
// of the two layers' t_c = S*ceil(n_i/P). Phase 2 offers an input only every
// T clocks (the required calculation time): outputs must leave every T
// clocks. Reports its counts on `checks` / `failures` and raises `done`.
module psan_nn_cfg_check
  import psan_pkg::*;
  import psan_ref_pkg::*;
#(
  parameter int P1 = 2, S1 = 3, NN1 = 2,
  parameter int P2 = 2, S2 = 1, NN2 = 1,
  parameter int T  = 3,
  parameter int NVEC = 60,
  // DERIVED=1: build psan_nn with only T set and let it choose (S, P, N_n);
  // P1..NN2 must then be given the values it is expected to choose.
  parameter bit DERIVED = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int TN1 = (2 + P1 - 1) / P1;
  localparam int TN2 = (6 + P2 - 1) / P2;
  localparam int TC  = (S1 * TN1 > S2 * TN2) ? S1 * TN1 : S2 * TN2;

  logic in_stb, in_ack, out_stb, out_ack;
  logic [0:0][DATA_W-1:0] in_x, out_y;

  if (DERIVED) begin : g_derived
    psan_nn #(.T(T)) dut (
      .clk, .rst_n, .in_stb, .in_ack, .in_x, .out_stb, .out_ack, .out_y);
    initial begin
      #1;
      if (dut.P1 != P1 || dut.S1 != S1 || dut.NN1 != NN1 ||
          dut.P2 != P2 || dut.S2 != S2 || dut.NN2 != NN2) begin
        failures++;
        $display("cfg t=%0d: derived parameters differ", T);
      end
    end
  end else begin : g_explicit
    psan_nn #(.P1(P1), .S1(S1), .NN1(NN1), .P2(P2), .S2(S2), .NN2(NN2)) dut (
      .clk, .rst_n, .in_stb, .in_ack, .in_x, .out_stb, .out_ack, .out_y);
  end

  initial checks = 0;
  initial failures = 0;
  int exp_q[$];
  int cyc = 0, last = -1, n_out = 0, phase = 0, n_rate = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign out_ack = 1'b1;

  always @(posedge clk) if (rst_n && out_stb) begin
    int e;
    e = exp_q.pop_front();
    checks++;
    if (int'($signed(out_y[0])) != e) begin
      failures++;
      $display("cfg t=%0d: output %0d got %0d expected %0d", T, n_out, $signed(out_y[0]), e);
    end
    if ((phase == 1 && n_out >= 4 && n_out < NVEC) || (phase == 2 && n_out >= NVEC + 2)) begin
      checks++;
      n_rate++;
      if (cyc - last != (phase == 1 ? TC : T)) begin
        failures++;
        $display("cfg t=%0d phase %0d: output interval %0d", T, phase, cyc - last);
      end
    end
    last = cyc;
    n_out++;
  end

  task automatic send(int x);
    vec_t r;
    r = ref_nn({x}, 6, 1, 17, 19);
    exp_q.push_back(r[0]);
    in_x[0] = DATA_W'(x);
    in_stb = 1'b1;
    do @(posedge clk); while (!in_ack);
    #1 in_stb = 1'b0;
  endtask

  initial begin
    done = 1'b0;
    in_stb = 1'b0; in_x = '0;
    @(posedge rst_n);
    #1 phase = 1;
    for (int n = 0; n < NVEC; n++) send(int'($urandom_range(255)) - 128);
    while (exp_q.size() != 0) @(posedge clk);
    #1 phase = 2;
    for (int n = 0; n < NVEC; n++) begin
      int c0;
      c0 = cyc;
      send(int'($urandom_range(255)) - 128);
      while (cyc - c0 < T) begin @(posedge clk); #1; end
    end
    while (exp_q.size() != 0) @(posedge clk);
    #1;
    checks++;
    if (n_out != 2 * NVEC || n_rate == 0) begin
      failures++;
      $display("cfg t=%0d: %0d outputs, %0d rate checks", T, n_out, n_rate);
    end
    done = 1'b1;
  end
endmodule
