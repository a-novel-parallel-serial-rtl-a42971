// tb_psan_serializer: two converters. A: 5 values plus the offset word sent
// as 3 beats of 2 words (layer 1 -> layer 2 of the default network).
// B: 4 values, no offset, sent one word per beat (parallel-in serial-out),
// under random handshakes on both sides. Every beat is compared with the
// expected word order; A is also checked for back-to-back vectors without a
// gap (one beat per clock when the consumer always accepts).
module tb_psan_serializer;
  import psan_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A
  logic a_ld_stb, a_ld_ack, a_stb, a_ack, a_last;
  logic [4:0][DATA_W-1:0] a_vec;
  logic [1:0][DATA_W-1:0] a_data;
  psan_serializer #(.NV(5), .OFFSET_EN(1), .OUT_P(2)) dut_a (
    .clk, .rst_n, .load_stb(a_ld_stb), .load_ack(a_ld_ack), .load_vec(a_vec),
    .out_stb(a_stb), .out_ack(a_ack), .out_data(a_data), .out_last(a_last));

  // B
  logic b_ld_stb, b_ld_ack, b_stb, b_ack, b_last;
  logic [3:0][DATA_W-1:0] b_vec;
  logic [0:0][DATA_W-1:0] b_data;
  psan_serializer #(.NV(4), .OFFSET_EN(0), .OUT_P(1)) dut_b (
    .clk, .rst_n, .load_stb(b_ld_stb), .load_ack(b_ld_ack), .load_vec(b_vec),
    .out_stb(b_stb), .out_ack(b_ack), .out_data(b_data), .out_last(b_last));

  int a_exp[$], b_exp[$];   // expected words in order
  int a_nv = 0, b_nv = 0, a_beats = 0, b_beats = 0;
  int random_mode = 0;
  int a_beats_window = 0;

  function automatic logic [7:0] a_word(int n, int i); return 8'(n * 5 + i * 17 + 1); endfunction
  function automatic logic [7:0] b_word(int n, int i); return 8'(n * 11 + i * 29 + 7); endfunction

  always @(negedge clk) begin
    a_ld_stb = rst_n && (!random_mode || $urandom_range(99) < 60);
    for (int i = 0; i < 5; i++) a_vec[i] = a_word(a_nv, i);
    a_ack    = !random_mode || $urandom_range(99) < 60;
    b_ld_stb = rst_n && ($urandom_range(99) < 50);
    for (int i = 0; i < 4; i++) b_vec[i] = b_word(b_nv, i);
    b_ack    = ($urandom_range(99) < 70);
  end

  always @(posedge clk) if (rst_n) begin
    if (a_ld_stb && a_ld_ack) begin
      a_exp.push_back(int'(OFFSET_VAL) & 255);
      for (int i = 0; i < 5; i++) a_exp.push_back(int'(a_word(a_nv, i)));
      a_nv++;
    end
    if (b_ld_stb && b_ld_ack) begin
      for (int i = 0; i < 4; i++) b_exp.push_back(int'(b_word(b_nv, i)));
      b_nv++;
    end
    if (a_stb && a_ack) begin
      int e0, e1;
      e0 = a_exp.pop_front();
      e1 = a_exp.pop_front();
      checks += 2;
      if (int'(a_data[0]) != e0 || int'(a_data[1]) != e1) begin
        failures++;
        $display("A beat %0d: got %0d %0d expected %0d %0d", a_beats, a_data[0], a_data[1], e0, e1);
      end
      if (a_last != (a_beats % 3 == 2)) begin
        failures++;
        $display("A beat %0d: out_last=%0d", a_beats, a_last);
      end
      a_beats++;
      a_beats_window++;
    end
    if (b_stb && b_ack) begin
      int e;
      e = b_exp.pop_front();
      checks++;
      if (int'(b_data[0]) != e) begin
        failures++;
        $display("B beat %0d: got %0d expected %0d", b_beats, b_data[0], e);
      end
      if (b_last != (b_beats % 4 == 3)) begin
        failures++;
        $display("B beat %0d: out_last=%0d", b_beats, b_last);
      end
      b_beats++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (10) @(posedge clk);
    #1 a_beats_window = 0;
    repeat (90) @(posedge clk);
    #1;
    checks++;
    if (a_beats_window != 90) begin
      failures++;
      $display("A: %0d beats in 90 clocks at full rate", a_beats_window);
    end
    random_mode = 1;
    repeat (3000) @(posedge clk);
    #1;
    checks++;
    if (a_beats < 500 || b_beats < 500) begin
      failures++;
      $display("too few beats %0d %0d", a_beats, b_beats);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
