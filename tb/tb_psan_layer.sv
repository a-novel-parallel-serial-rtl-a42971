// tb_psan_layer: two PSAN layers driven on their own.
//   A: the default layer (first layer of the 2-6-1 network): NI=2, NO=5,
//      P=2, S=3, NN=2, t_c=3; output re-formatted as 3 beats of 2 words with
//      the offset word in front.
//   B: NI=5, NO=5, P=2, S=2, NN=3 (t_n=3, t_c=6): padding on the input side
//      (a zero sixth input) and on the output side (a sixth, unused neuron
//      slot), output as 2 beats of 4 words with no offset.
//   C: NI=2, NO=5, P=1, S=2, NN=3 (t_c=4) feeding 2 words per beat: fewer
//      output words than neurons, so the layer's two activation functions sit
//      after the output converter.
// Each output vector is compared with the reference dot products through the
// activation function. A full-rate phase checks one output vector every t_c
// clocks; a random phase throttles both handshakes.
module tb_psan_layer;
  import psan_pkg::*;
  import psan_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int random_mode = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- layer A (defaults) ----------------
  logic a_in_stb, a_in_ack, a_out_stb, a_out_ack, a_last;
  logic [1:0][DATA_W-1:0] a_in, a_out;
  psan_layer dut_a (.clk, .rst_n, .in_stb(a_in_stb), .in_ack(a_in_ack), .in_data(a_in),
                    .out_stb(a_out_stb), .out_ack(a_out_ack), .out_data(a_out), .out_last(a_last));

  // ---------------- layer B ----------------
  logic b_in_stb, b_in_ack, b_out_stb, b_out_ack, b_last;
  logic [1:0][DATA_W-1:0] b_in;
  logic [3:0][DATA_W-1:0] b_out;
  psan_layer #(.LAYER(2), .NI(5), .NO(5), .P(2), .S(2), .NN(3), .ACC_W(19),
               .NEXT_P(4), .NEXT_OFFSET(0)) dut_b (
    .clk, .rst_n, .in_stb(b_in_stb), .in_ack(b_in_ack), .in_data(b_in),
    .out_stb(b_out_stb), .out_ack(b_out_ack), .out_data(b_out), .out_last(b_last));

  // ---------------- layer C ----------------
  logic c_in_stb, c_in_ack, c_out_stb, c_out_ack, c_last;
  logic [0:0][DATA_W-1:0] c_in;
  logic [1:0][DATA_W-1:0] c_out;
  psan_layer #(.LAYER(1), .NI(2), .NO(5), .P(1), .S(2), .NN(3), .ACC_W(17),
               .NEXT_P(2), .NEXT_OFFSET(1)) dut_c (
    .clk, .rst_n, .in_stb(c_in_stb), .in_ack(c_in_ack), .in_data(c_in),
    .out_stb(c_out_stb), .out_ack(c_out_ack), .out_data(c_out), .out_last(c_last));

  // expected output words per layer
  int a_exp[$], b_exp[$], c_exp[$];
  int c_vecs = 0, c_last_cyc = -1, c_rate = 0;
  int a_vecs = 0, b_vecs = 0, a_last_cyc = -1, b_last_cyc = -1, a_rate = 0, b_rate = 0;

  always @(negedge clk) begin
    a_out_ack = !random_mode || $urandom_range(99) < 50;
    b_out_ack = !random_mode || $urandom_range(99) < 50;
    c_out_ack = !random_mode || $urandom_range(99) < 50;
  end

  always @(posedge clk) if (rst_n) begin
    if (a_out_stb && a_out_ack) begin
      for (int p = 0; p < 2; p++) begin
        int e;
        e = a_exp.pop_front();
        checks++;
        if (int'($signed(a_out[p])) != e) begin
          failures++;
          $display("A vec %0d word %0d: got %0d expected %0d", a_vecs, p, $signed(a_out[p]), e);
        end
      end
      if (a_last) begin
        if (!random_mode && a_vecs >= 3 && a_vecs < 100) begin
          checks++;
          a_rate++;
          if (cyc - a_last_cyc != 3) begin
            failures++;
            $display("A vector interval %0d, expected 3", cyc - a_last_cyc);
          end
        end
        a_last_cyc = cyc;
        a_vecs++;
      end
    end
    if (b_out_stb && b_out_ack) begin
      for (int p = 0; p < 4; p++) begin
        int e;
        e = b_exp.pop_front();
        checks++;
        if (int'($signed(b_out[p])) != e) begin
          failures++;
          $display("B vec %0d word %0d: got %0d expected %0d", b_vecs, p, $signed(b_out[p]), e);
        end
      end
      if (b_last) begin
        if (!random_mode && b_vecs >= 3 && b_vecs < 100) begin
          checks++;
          b_rate++;
          if (cyc - b_last_cyc != 6) begin
            failures++;
            $display("B vector interval %0d, expected 6", cyc - b_last_cyc);
          end
        end
        b_last_cyc = cyc;
        b_vecs++;
      end
    end
  end

  always @(posedge clk) if (rst_n && c_out_stb && c_out_ack) begin
    for (int p = 0; p < 2; p++) begin
      int e;
      e = c_exp.pop_front();
      checks++;
      if (int'($signed(c_out[p])) != e) begin
        failures++;
        $display("C vec %0d word %0d: got %0d expected %0d", c_vecs, p, $signed(c_out[p]), e);
      end
    end
    if (c_last) begin
      if (!random_mode && c_vecs >= 3 && c_vecs < 100) begin
        checks++;
        c_rate++;
        if (cyc - c_last_cyc != 4) begin
          failures++;
          $display("C vector interval %0d, expected 4", cyc - c_last_cyc);
        end
      end
      c_last_cyc = cyc;
      c_vecs++;
    end
  end

  task automatic drive_c(int nvec);
    for (int n = 0; n < nvec; n++) begin
      vec_t v, r;
      v = {int'(OFFSET_VAL), int'($urandom_range(255)) - 128};
      r = ref_layer(1, 5, 17, v);
      c_exp.push_back(int'(OFFSET_VAL));
      foreach (r[i]) c_exp.push_back(r[i]);
      for (int k = 0; k < 2; k++) begin
        while (random_mode && $urandom_range(99) < 30) begin
          c_in_stb = 1'b0;
          @(posedge clk);
          #1;
        end
        c_in_stb = 1'b1;
        c_in[0] = DATA_W'(v[k]);
        do @(posedge clk); while (!c_in_ack);
        #1 c_in_stb = 1'b0;
      end
    end
  endtask

  task automatic drive_a(int nvec);
    for (int n = 0; n < nvec; n++) begin
      vec_t v, r;
      v = {int'(OFFSET_VAL), int'($urandom_range(255)) - 128};
      r = ref_layer(1, 5, 17, v);
      a_exp.push_back(int'(OFFSET_VAL));
      foreach (r[i]) a_exp.push_back(r[i]);
      while (random_mode && $urandom_range(99) < 40) begin
        a_in_stb = 1'b0;
        @(posedge clk);
        #1;
      end
      a_in_stb = 1'b1;
      a_in[0] = DATA_W'(v[0]);
      a_in[1] = DATA_W'(v[1]);
      do @(posedge clk); while (!a_in_ack);
      #1 a_in_stb = 1'b0;
    end
  endtask

  task automatic drive_b(int nvec);
    for (int n = 0; n < nvec; n++) begin
      vec_t v, r;
      v = {int'(OFFSET_VAL)};
      for (int i = 1; i < 5; i++) v.push_back(int'($urandom_range(255)) - 128);
      r = ref_layer(2, 5, 19, v);
      foreach (r[i]) b_exp.push_back(r[i]);
      for (int i = 0; i < 3; i++) b_exp.push_back(0);   // padding words
      v.push_back(0);                                   // input padding
      for (int k = 0; k < 3; k++) begin
        while (random_mode && $urandom_range(99) < 30) begin
          b_in_stb = 1'b0;
          @(posedge clk);
          #1;
        end
        b_in_stb = 1'b1;
        b_in[0] = DATA_W'(v[2 * k]);
        b_in[1] = DATA_W'(v[2 * k + 1]);
        do @(posedge clk); while (!b_in_ack);
        #1 b_in_stb = 1'b0;
      end
    end
  endtask

  initial begin
    a_in_stb = 1'b0; b_in_stb = 1'b0; a_in = '0; b_in = '0; c_in_stb = 1'b0; c_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    fork
      drive_a(100);
      drive_b(100);
      drive_c(100);
    join
    repeat (20) @(posedge clk);
    #1 random_mode = 1;
    fork
      drive_a(200);
      drive_b(200);
      drive_c(200);
    join
    random_mode = 0;
    repeat (40) @(posedge clk);
    #1;
    checks += 3;
    if (a_vecs != 300 || b_vecs != 300 || c_vecs != 300) begin
      failures++;
      $display("vectors out: A %0d B %0d C %0d", a_vecs, b_vecs, c_vecs);
    end
    if (a_rate == 0 || b_rate == 0 || c_rate == 0) begin failures++; $display("rate not measured"); end
    if (a_exp.size() != 0 || b_exp.size() != 0 || c_exp.size() != 0) begin
      failures++;
      $display("words left over");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
