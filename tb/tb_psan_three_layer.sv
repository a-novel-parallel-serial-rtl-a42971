// tb_psan_three_layer: three-layer networks whose layers all have the same
// size (3 inputs plus the offset in, 3 outputs), built from psan_layer in
// each way that suits a required time t equal to the layer size n_i = 4,
// to half of it and to twice it:
//   t | S,P,N_n | interface between layers      | t_c
//   2 | 1,2,3   | 2-word beats, two AFs         | 2
//   2 | 2,4,2   | parallel, two AFs             | 2
//   4 | 1,4,3   | parallel, one AF per neuron   | 1
//   4 | 1,1,3   | serial, one AF per layer      | 4
//   4 | 3,4,1   | parallel, one reused neuron   | 3 (one idle clock per t)
//   8 | 2,1,2   | serial, one AF per layer      | 8
//   8 | 3,2,1   | 2-word beats, one neuron      | 6
// The t=2 rows follow the rule for t = n/k (k=2): P=1 becomes P=k, S=n_o
// becomes S=n_o/k (rounded up, so one neuron slot is padding), and each
// layer has k AFs. The t=8 rows follow the rule for t = k*n: S=1 becomes
// S=k and P=n_i becomes P=n_i/k. Each chain is checked for correct outputs, for its rate
// t_c at full input rate and for exactly t clocks per vector when inputs
// arrive every t clocks.
module tb_psan_three_layer;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NC = 7;
  logic done [NC];
  int   chk  [NC];
  int   fail [NC];

  psan_chain3_check #(.P(4), .S(1), .NN(3), .T(4)) par  (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  psan_chain3_check #(.P(1), .S(1), .NN(3), .T(4)) ser  (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  psan_chain3_check #(.P(4), .S(3), .NN(1), .T(4)) one  (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  psan_chain3_check #(.P(1), .S(2), .NN(2), .T(8)) ser2 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fail[3]));
  psan_chain3_check #(.P(2), .S(3), .NN(1), .T(8)) one2 (.clk, .rst_n, .done(done[4]), .checks(chk[4]), .failures(fail[4]));
  psan_chain3_check #(.P(2), .S(1), .NN(3), .T(2)) serh (.clk, .rst_n, .done(done[5]), .checks(chk[5]), .failures(fail[5]));
  psan_chain3_check #(.P(4), .S(2), .NN(2), .T(2)) oneh (.clk, .rst_n, .done(done[6]), .checks(chk[6]), .failures(fail[6]));

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
