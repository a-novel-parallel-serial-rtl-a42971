// tb_psan_weight_rom: instantiates every ROM of the first layer of the
// default network (NN=2 neurons x P=2 multipliers, S=3, NI=2, NO=5) and of
// a layer with padding on both axes (NI=5, NO=5, P=2, S=2, NN=3), and
// checks each address against the schedule worked out from the other side:
// for every (output o, input i) the owning neuron is o % NN, the pass o / NN,
// the multiplier i % P and the beat i / P; unused slots must read 0.
module tb_psan_weight_rom;
  import psan_pkg::*;

  int checks = 0, failures = 0;

  localparam int NI1 = 2, NO1 = 5, P1 = 2, S1 = 3, NN1 = 2, TN1 = 1;
  localparam int NI2 = 5, NO2 = 5, P2 = 2, S2 = 2, NN2 = 3, TN2 = 3;

  logic [1:0]  addr1;
  weight_t     w1 [NN1][P1];
  logic [2:0]  addr2;
  weight_t     w2 [NN2][P2];

  for (genvar n = 0; n < NN1; n++) begin : g_n1
    for (genvar p = 0; p < P1; p++) begin : g_p1
      psan_weight_rom #(.LAYER(1), .NI(NI1), .NO(NO1), .P(P1), .S(S1), .NN(NN1),
                        .NEURON(n), .MULT(p)) u (.addr(addr1), .weight(w1[n][p]));
    end
  end
  for (genvar n = 0; n < NN2; n++) begin : g_n2
    for (genvar p = 0; p < P2; p++) begin : g_p2
      psan_weight_rom #(.LAYER(2), .NI(NI2), .NO(NO2), .P(P2), .S(S2), .NN(NN2),
                        .NEURON(n), .MULT(p)) u (.addr(addr2), .weight(w2[n][p]));
    end
  end

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen1 [NN1][P1][S1*TN1];
    int seen2 [NN2][P2][S2*TN2];
    foreach (seen1[a, b, c]) seen1[a][b][c] = 0;
    foreach (seen2[a, b, c]) seen2[a][b][c] = 0;
    // configuration 1
    for (int o = 0; o < NO1; o++) begin
      for (int i = 0; i < NI1; i++) begin
        int n, p, a;
        n = o % NN1; p = i % P1; a = (o / NN1) * TN1 + i / P1;
        addr1 = 2'(a);
        #1;
        checks++;
        seen1[n][p][a] = 1;
        if (w1[n][p] != psan_weight(1, o, i)) begin
          failures++;
          $display("cfg1 o=%0d i=%0d: got %0d expected %0d", o, i, w1[n][p], psan_weight(1, o, i));
        end
      end
    end
    for (int a = 0; a < S1 * TN1; a++) begin
      addr1 = 2'(a);
      #1;
      for (int n = 0; n < NN1; n++) for (int p = 0; p < P1; p++)
        if (!seen1[n][p][a]) begin
          checks++;
          if (w1[n][p] != 0) begin failures++; $display("cfg1 pad n%0d p%0d a%0d nonzero", n, p, a); end
        end
    end
    // configuration 2
    for (int o = 0; o < NO2; o++) begin
      for (int i = 0; i < NI2; i++) begin
        int n, p, a;
        n = o % NN2; p = i % P2; a = (o / NN2) * TN2 + i / P2;
        addr2 = 3'(a);
        #1;
        checks++;
        seen2[n][p][a] = 1;
        if (w2[n][p] != psan_weight(2, o, i)) begin
          failures++;
          $display("cfg2 o=%0d i=%0d: got %0d expected %0d", o, i, w2[n][p], psan_weight(2, o, i));
        end
      end
    end
    for (int a = 0; a < S2 * TN2; a++) begin
      addr2 = 3'(a);
      #1;
      for (int n = 0; n < NN2; n++) for (int p = 0; p < P2; p++)
        if (!seen2[n][p][a]) begin
          checks++;
          if (w2[n][p] != 0) begin failures++; $display("cfg2 pad n%0d p%0d a%0d nonzero", n, p, a); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
