// tb_psan_params: checks the elaboration-time sizing functions of psan_pkg
// against hand-worked cases:
//  * a layer with n_i=5, n_o=8, t=6: for P = 1, 2, 3, 5 the neuron counts
//    8, 4, 3, 2, reuse counts 1, 2, 3, 4 and redundancies 8, 8, 14, 20;
//    P=4 needs as many neurons as P=3; the least redundant choice is P=1;
//  * the 2-6-1 network: for each required time t the (S, P, N_n) of both
//    layers, and the per-clock redundancy R = P*N_n - n_i*n_o/t;
//  * the multiplications wasted per t=3 calculation cycle, R_t, for three
//    ways of building the 2-6-1 network: the (S, P) choice (2 and 0), fully
//    parallel layers (20 and 12) and a serial first layer with a parallel
//    second layer (5 and 12);
//  * that psan_nn built with only T changed picks those values.
module tb_psan_params;
  import psan_pkg::*;

  int checks = 0, failures = 0;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // psan_nn elaborated for t = 10: the parameters it derives
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_stb = 1'b0, in_ack, out_stb, out_ack = 1'b1;
  logic [0:0][7:0] in_x = '0, out_y;
  psan_nn #(.T(10)) nn10 (.*);
  psan_nn nn3 (.clk, .rst_n, .in_stb, .in_ack(), .in_x, .out_stb(), .out_ack, .out_y());

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nn_exp[6], s_exp[6], r_exp[6];
    // ---- n_i=5, n_o=8, t=6 ----
    nn_exp = '{0, 8, 4, 3, 3, 2};
    s_exp  = '{0, 1, 2, 3, 3, 4};
    r_exp  = '{0, 8, 8, 14, 32, 20};
    for (int p = 1; p <= 5; p++) begin
      int nn;
      nn = int'(psan_neurons(5, 8, p, 6));
      expect_eq($sformatf("ex3 P=%0d N_n", p), nn, nn_exp[p]);
      expect_eq($sformatf("ex3 P=%0d S", p), int'(psan_reuse(8, nn)), s_exp[p]);
      expect_eq($sformatf("ex3 P=%0d R_t", p), psan_redundancy(5, 8, p, nn, 6), r_exp[p]);
    end
    expect_eq("ex3 optimum P", int'(psan_opt_p(5, 8, 6)), 1);

    // ---- 2-6-1 network, layer 1 (n_i=2, n_o=5) and layer 2 (n_i=6, n_o=1) ----
    // t, P1 (the choice of the reference table), N_n1, S1, 100*R1 (rounded), P2, N_n2
    begin
      int tab[7][7];
      tab = '{'{1, 2, 5, 1,   0, 6, 1},
              '{2, 2, 3, 2, 100, 3, 1},
              '{3, 2, 2, 3,  67, 2, 1},
              '{4, 1, 3, 2,  50, 2, 1},
              '{5, 2, 1, 5,   0, 2, 1},
              '{6, 2, 1, 5,  33, 1, 1},
              '{10, 1, 1, 5,  0, 1, 1}};
      foreach (tab[r]) begin
        int t, p1, nn1, r100;
        real rr;
        t  = tab[r][0];
        p1 = tab[r][1];
        nn1 = int'(psan_neurons(2, 5, p1, t));
        expect_eq($sformatf("t=%0d layer 1 N_n", t), nn1, tab[r][2]);
        expect_eq($sformatf("t=%0d layer 1 S", t), int'(psan_reuse(5, nn1)), tab[r][3]);
        rr = real'(p1 * nn1) - 10.0 / real'(t);
        r100 = int'(rr * 100.0);   // int'() of a real rounds to nearest
        expect_eq($sformatf("t=%0d layer 1 100*R", t), r100, tab[r][4]);
        expect_eq($sformatf("t=%0d layer 2 P", t), int'(psan_opt_p(6, 1, t)), tab[r][5]);
        expect_eq($sformatf("t=%0d layer 2 N_n", t),
                  int'(psan_neurons(6, 1, tab[r][5], t)), tab[r][6]);
      end
    end
    // layer 1 choices of the search where the least redundancy decides
    expect_eq("t=3 layer 1 P", int'(psan_opt_p(2, 5, 3)), 2);
    expect_eq("t=4 layer 1 P", int'(psan_opt_p(2, 5, 4)), 1);
    expect_eq("t=5 layer 1 P", int'(psan_opt_p(2, 5, 5)), 2);
    expect_eq("t=10 layer 1 P", int'(psan_opt_p(2, 5, 10)), 1);

    // ---- R_t per t=3 cycle: (S, P) choice, fully parallel, serial+parallel ----
    expect_eq("t=3 chosen layer 1 R_t", psan_redundancy(2, 5, 2, 2, 3), 2);
    expect_eq("t=3 chosen layer 2 R_t", psan_redundancy(6, 1, 2, 1, 3), 0);
    expect_eq("t=3 parallel layer 1 R_t", psan_redundancy(2, 5, 2, 5, 3), 20);
    expect_eq("t=3 parallel layer 2 R_t", psan_redundancy(6, 1, 6, 1, 3), 12);
    expect_eq("t=3 serial layer 1 R_t", psan_redundancy(2, 5, 1, 5, 3), 5);

    // ---- what psan_nn derives ----
    expect_eq("nn3 P1", int'(nn3.P1), 2);
    expect_eq("nn3 S1", int'(nn3.S1), 3);
    expect_eq("nn3 NN1", int'(nn3.NN1), 2);
    expect_eq("nn3 P2", int'(nn3.P2), 2);
    expect_eq("nn3 S2", int'(nn3.S2), 1);
    expect_eq("nn10 P1", int'(nn10.P1), 1);
    expect_eq("nn10 S1", int'(nn10.S1), 5);
    expect_eq("nn10 NN1", int'(nn10.NN1), 1);
    expect_eq("nn10 P2", int'(nn10.P2), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
