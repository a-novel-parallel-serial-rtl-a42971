// tb_psan_fimfo: checks the First-In Multiple-First-Out buffer with packets
// of 4 words repeated 2 times (the n_i=4, S=2 example) and with packets of 3
// words repeated 3 times, under random write and read handshakes. Every
// word read is compared with the expected replay order, as are the beat and
// repetition counters; a full-rate run checks one word per clock.
module tb_psan_fimfo;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    finish();
  end

  // DUT A: PKT=4, REPEAT=2, DEPTH=8
  logic        a_in_stb, a_in_ack, a_out_stb, a_out_ack;
  logic [15:0] a_in_data, a_out_data;
  logic [1:0]  a_beat;
  logic        a_rep;
  psan_fimfo #(.WIDTH(16), .DEPTH(8), .PKT(4), .REPEAT(2)) dut_a (
    .clk, .rst_n, .in_stb(a_in_stb), .in_ack(a_in_ack), .in_data(a_in_data),
    .out_stb(a_out_stb), .out_ack(a_out_ack), .out_data(a_out_data),
    .out_beat(a_beat), .out_rep(a_rep));

  // DUT B: PKT=3, REPEAT=3, DEPTH=4
  logic        b_in_stb, b_in_ack, b_out_stb, b_out_ack;
  logic [15:0] b_in_data, b_out_data;
  logic [1:0]  b_beat;
  logic [1:0]  b_rep;
  psan_fimfo #(.WIDTH(16), .DEPTH(4), .PKT(3), .REPEAT(3)) dut_b (
    .clk, .rst_n, .in_stb(b_in_stb), .in_ack(b_in_ack), .in_data(b_in_data),
    .out_stb(b_out_stb), .out_ack(b_out_ack), .out_data(b_out_data),
    .out_beat(b_beat), .out_rep(b_rep));

  int a_wr = 0, a_rd = 0, b_wr = 0, b_rd = 0;
  int a_in_pct = 100, a_out_pct = 100, b_in_pct = 70, b_out_pct = 60;
  int a_words = 0, a_limit = 0;

  // expected n-th output word for a packet size k, repeat r: word index
  function automatic int exp_idx(int n, int k, int r);
    int pkt, pos;
    pkt = n / (k * r);
    pos = n % k;
    return pkt * k + pos;
  endfunction

  always @(negedge clk) begin
    a_in_stb  = rst_n && ($urandom_range(99) < a_in_pct);
    a_in_data = 16'(a_wr * 7 + 3);
    a_out_ack = ($urandom_range(99) < a_out_pct);
    b_in_stb  = rst_n && ($urandom_range(99) < b_in_pct);
    b_in_data = 16'(b_wr * 13 + 1);
    b_out_ack = ($urandom_range(99) < b_out_pct);
  end

  always @(posedge clk) if (rst_n) begin
    if (a_in_stb && a_in_ack) a_wr++;
    if (b_in_stb && b_in_ack) b_wr++;
    if (a_out_stb && a_out_ack) begin
      int e;
      e = exp_idx(a_rd, 4, 2);
      checks += 2;
      if (a_out_data != 16'(e * 7 + 3)) begin
        failures++;
        $display("A read %0d: got %0d expected word %0d", a_rd, a_out_data, e);
      end
      if (int'(a_beat) != a_rd % 4 || int'(a_rep) != (a_rd / 4) % 2) begin
        failures++;
        $display("A read %0d: beat %0d rep %0d", a_rd, a_beat, a_rep);
      end
      a_rd++;
      a_words++;
    end
    if (b_out_stb && b_out_ack) begin
      int e;
      e = exp_idx(b_rd, 3, 3);
      checks += 2;
      if (b_out_data != 16'(e * 13 + 1)) begin
        failures++;
        $display("B read %0d: got %0d expected word %0d", b_rd, b_out_data, e);
      end
      if (int'(b_beat) != b_rd % 3 || int'(b_rep) != (b_rd / 3) % 3) begin
        failures++;
        $display("B read %0d: beat %0d rep %0d", b_rd, b_beat, b_rep);
      end
      b_rd++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // full rate for A: after filling, one output word per clock
    repeat (20) @(posedge clk);
    #1 a_words = 0;
    repeat (100) @(posedge clk);
    #1;
    checks++;
    if (a_words != 100) begin
      failures++;
      $display("A full-rate: %0d words in 100 clocks", a_words);
    end
    // random handshakes on A
    a_in_pct = 50;
    a_out_pct = 50;
    repeat (4000) @(posedge clk);
    checks++;
    if (a_rd < 500 || b_rd < 500) begin
      failures++;
      $display("too few reads: %0d %0d", a_rd, b_rd);
    end
    finish();
  end
endmodule
