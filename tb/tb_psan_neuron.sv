// tb_psan_neuron: the single-neuron schedule of the 6-input, 3-output layer
// with P=2 multipliers reused S=3 times (9 clocks per vector). Beats are
// driven in the order input pairs (1,2), (3,4), (5,6) for neuron output 1,
// then again for outputs 2 and 3. Each completed output is compared with a
// directly computed dot product. Phase 1 runs at full rate and checks the
// 2-clock latency from the last beat and one output per t_n=3 clocks;
// phase 2 adds random stalls (en low) and idle beats (in_valid low).
module tb_psan_neuron;
  import psan_pkg::*;
  import psan_ref_pkg::*;

  localparam int NI = 6, NO = 3, P = 2, S = 3, ACC_W = 19, TN = 3, LAYER = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     en, in_valid, out_valid;
  logic [P-1:0][DATA_W-1:0] in_data;
  logic [1:0]               in_beat, in_pass, out_pass;
  logic signed [ACC_W-1:0]  out_acc;

  psan_neuron #(.LAYER(LAYER), .NI(NI), .NO(NO), .P(P), .S(S), .NN(1), .NEURON(0),
                .ACC_W(ACC_W)) dut (.*);

  int checks = 0, failures = 0;
  int exp_q[$];
  int lastbeat_cyc[$];
  int cyc = 0;
  int phase = 1;
  int n_out = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && en && out_valid) begin
    int e, c;
    checks++;
    e = exp_q.pop_front();
    c = lastbeat_cyc.pop_front();
    if (int'(out_acc) != e) begin
      failures++;
      $display("output %0d: got %0d expected %0d", n_out, out_acc, e);
    end
    if (phase == 1) begin
      checks++;
      if (cyc - c != 2) begin
        failures++;
        $display("latency %0d, expected 2", cyc - c);
      end
    end
    n_out++;
  end

  initial begin
    vec_t v;
    en = 1'b1; in_valid = 1'b0; in_data = '0; in_beat = '0; in_pass = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int vec = 0; vec < 300; vec++) begin
      if (vec == 100) phase = 2;
      v = {};
      v.push_back(int'(OFFSET_VAL));
      for (int i = 1; i < NI; i++) v.push_back(int'($urandom_range(255)) - 128);
      for (int s = 0; s < S; s++) begin
        exp_q.push_back(ref_dot(LAYER, s, v));
        for (int k = 0; k < TN; k++) begin
          // phase 2: random stall cycles and idle beats before this beat
          if (phase == 2) begin
            while ($urandom_range(99) < 30) begin
              en = ($urandom_range(1) == 0);
              in_valid = 1'b0;
              @(posedge clk);
              #1;
            end
          end
          en = 1'b1;
          in_valid = 1'b1;
          in_beat = 2'(k);
          in_pass = 2'(s);
          in_data[0] = DATA_W'(v[k * P]);
          in_data[1] = DATA_W'(v[k * P + 1]);
          @(posedge clk);
          if (k == TN - 1) lastbeat_cyc.push_back(cyc);
          #1;
        end
      end
      if (vec == 99) begin
        // full-rate part done: 100 vectors x 9 beats
        in_valid = 1'b0;
        repeat (3) @(posedge clk);
        #1;
        checks++;
        if (n_out != 300) begin
          failures++;
          $display("full rate: %0d outputs after 100 vectors", n_out);
        end
      end
    end
    in_valid = 1'b0;
    en = 1'b1;
    repeat (5) @(posedge clk);
    checks++;
    if (n_out != 900) begin failures++; $display("%0d outputs, expected 900", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
