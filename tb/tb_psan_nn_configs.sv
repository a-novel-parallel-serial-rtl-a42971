// tb_psan_nn_configs: the 2-6-1 network in each (S, P) configuration of the
// reference implementation table, one per required calculation time t:
//   t  | layer 1 S,P,Nn | layer 2 S,P
//   1  | 1,2,5          | 1,6   (fully parallel)
//   2  | 2,2,3          | 1,3
//   3  | 3,2,2          | 1,2   (default)
//   4  | 3,2,2          | 1,2   (t_c=3, one idle clock)
//   4  | 2,1,3          | 1,2   (alternative with serial input)
//   5  | 5,2,1          | 1,2
//   6  | 5,2,1          | 1,1   (also used for t=7..9 with idle clocks)
//   10 | 5,1,1          | 1,1
// One more runs at t=3 with one multiplier per neuron in layer 1 and a
// fully parallel layer 2 (layer 1 S,P,Nn = 1,1,5, layer 2 S,P = 1,6; t_c=2).
// Two more are built from the required time alone (t=2 and t=6, where the
// parameter search picks layer 1 (S, P, N_n) = (1, 1, 5) and (3, 1, 2)).
// Each is checked for correct outputs, for its own rate t_c at full input
// rate and for exactly t clocks per vector when inputs arrive every t clocks.
module tb_psan_nn_configs;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NC = 12;
  logic done [NC];
  int   chk  [NC];
  int   fail [NC];

  psan_nn_cfg_check #(.P1(2), .S1(1), .NN1(5), .P2(6), .S2(1), .NN2(1), .T(1))  c1  (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  psan_nn_cfg_check #(.P1(2), .S1(2), .NN1(3), .P2(3), .S2(1), .NN2(1), .T(2))  c2  (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  psan_nn_cfg_check #(.P1(2), .S1(3), .NN1(2), .P2(2), .S2(1), .NN2(1), .T(3))  c3  (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  psan_nn_cfg_check #(.P1(2), .S1(3), .NN1(2), .P2(2), .S2(1), .NN2(1), .T(4))  c4a (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fail[3]));
  psan_nn_cfg_check #(.P1(1), .S1(2), .NN1(3), .P2(2), .S2(1), .NN2(1), .T(4))  c4b (.clk, .rst_n, .done(done[4]), .checks(chk[4]), .failures(fail[4]));
  psan_nn_cfg_check #(.P1(2), .S1(5), .NN1(1), .P2(2), .S2(1), .NN2(1), .T(5))  c5  (.clk, .rst_n, .done(done[5]), .checks(chk[5]), .failures(fail[5]));
  psan_nn_cfg_check #(.P1(2), .S1(5), .NN1(1), .P2(1), .S2(1), .NN2(1), .T(6))  c6  (.clk, .rst_n, .done(done[6]), .checks(chk[6]), .failures(fail[6]));
  psan_nn_cfg_check #(.P1(2), .S1(5), .NN1(1), .P2(1), .S2(1), .NN2(1), .T(9))  c9  (.clk, .rst_n, .done(done[7]), .checks(chk[7]), .failures(fail[7]));
  psan_nn_cfg_check #(.P1(1), .S1(5), .NN1(1), .P2(1), .S2(1), .NN2(1), .T(10)) c10 (.clk, .rst_n, .done(done[8]), .checks(chk[8]), .failures(fail[8]));
  psan_nn_cfg_check #(.P1(1), .S1(1), .NN1(5), .P2(6), .S2(1), .NN2(1), .T(3))  h3  (.clk, .rst_n, .done(done[11]), .checks(chk[11]), .failures(fail[11]));
  // built from T alone: the parameter search picks P1=1 for t=2 and t=6
  psan_nn_cfg_check #(.P1(1), .S1(1), .NN1(5), .P2(3), .S2(1), .NN2(1), .T(2), .DERIVED(1)) d2 (.clk, .rst_n, .done(done[9]), .checks(chk[9]), .failures(fail[9]));
  psan_nn_cfg_check #(.P1(1), .S1(3), .NN1(2), .P2(1), .S2(1), .NN2(1), .T(6), .DERIVED(1)) d6 (.clk, .rst_n, .done(done[10]), .checks(chk[10]), .failures(fail[10]));

  int checks, failures;

  task automatic report();
    checks = 0;
    failures = 0;
    for (int i = 0; i < NC; i++) begin
      checks += chk[i];
      failures += fail[i];
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    report();
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    forever begin
      bit all;
      @(posedge clk);
      all = 1'b1;
      for (int i = 0; i < NC; i++) all &= done[i];
      if (all) break;
    end
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
