// tb_psan_nn: end-to-end test of the 2-6-1 PSAN network at its default
// parameters (t = 3 clocks per vector).
//
// Three phases: (1) inputs offered every clock, output always accepted:
// checks every output against the reference model and that outputs leave
// exactly every t_c = 3 clocks in steady state; (2) random output
// back-pressure: exercises the stb/ack hold, the layer stall and FIFO
// fill; (3) inputs offered only every 5th clock: idle cycles between
// vectors. The latency of the first vector through the empty pipeline is
// checked (15 clocks from input accepted to output offered). It counts how often each mechanism occurred (FIMFO replay,
// offset insertion, padding slot dropped, stalls, idle beats, positive and
// negative AF saturation) and fails any that never did.
module tb_psan_nn;
  import psan_pkg::*;
  import psan_ref_pkg::*;

  localparam int TC = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                   in_stb, in_ack, out_stb, out_ack;
  logic [0:0][DATA_W-1:0] in_x;
  logic [0:0][DATA_W-1:0] out_y;

  psan_nn dut (.*);

  int checks = 0, failures = 0;
  int exp_q[$];
  int n_out = 0;
  int cyc = 0;
  int last_out_cyc = -1;
  int phase = 0;
  int first_in_cyc = -1;
  localparam int LATENCY = 15;   // input accepted -> output offered, empty pipe

  // mechanism counters
  int c_replay = 0, c_offset = 0, c_pad = 0, c_stall = 0, c_hold = 0;
  int c_idle = 0, c_sat_hi = 0, c_sat_lo = 0, c_tput = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic finish();
    $display("mechanisms: replay=%0d offset=%0d pad_dropped=%0d layer_stall=%0d out_hold=%0d idle=%0d sat_hi=%0d sat_lo=%0d tput=%0d",
             c_replay, c_offset, c_pad, c_stall, c_hold, c_idle, c_sat_hi, c_sat_lo, c_tput);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // Watchdog
  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    finish();
  end

  // Output monitor / scoreboard
  always @(posedge clk) if (rst_n) begin
    if (in_stb && in_ack && first_in_cyc < 0) first_in_cyc = cyc;
    if (out_stb && n_out == 0 && first_in_cyc >= 0) begin
      checks++;
      if (cyc - first_in_cyc != LATENCY) begin
        failures++;
        $display("latency %0d, expected %0d", cyc - first_in_cyc, LATENCY);
      end
    end
    if (out_stb && out_ack) begin
      int e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output %0d", $signed(out_y[0]));
      end else begin
        e = exp_q.pop_front();
        if (int'($signed(out_y[0])) != e) begin
          failures++;
          $display("output %0d: got %0d expected %0d", n_out, $signed(out_y[0]), e);
        end
      end
      // steady-state rate in phase 1
      if (phase == 1 && n_out >= 4) begin
        checks++;
        c_tput++;
        if (cyc - last_out_cyc != TC) begin
          failures++;
          $display("output interval %0d, expected %0d", cyc - last_out_cyc, TC);
        end
      end
      last_out_cyc = cyc;
      n_out++;
    end
    if (out_stb && !out_ack) c_hold++;
    // internal mechanisms
    if (dut.u_layer1.f_stb && dut.u_layer1.adv && dut.u_layer1.f_rep != 0) c_replay++;
    if (!dut.u_layer1.adv || !dut.u_layer2.adv) c_stall++;
    if (phase == 3 && !dut.u_layer1.f_stb) c_idle++;
    if (dut.h_stb && dut.h_ack && dut.u_layer1.u_ser.beat == 0) begin
      checks++;
      c_offset++;
      if ($signed(dut.h_data[0]) != OFFSET_VAL) begin
        failures++;
        $display("offset word missing: %0d", $signed(dut.h_data[0]));
      end
    end
    if (dut.u_layer1.wb && dut.u_layer1.adv && dut.u_layer1.wb_last) c_pad++;
  end

  task automatic send(input int x);
    vec_t xv, yv, hv, v;
    xv = {x};
    yv = ref_nn(xv, 6, 1, 17, 19);
    exp_q.push_back(yv[0]);
    // saturation statistics from the reference hidden layer
    v = {int'(OFFSET_VAL), x};
    for (int o = 0; o < 5; o++) begin
      int a;
      a = ref_dot(1, o, v) >>> 5;
      if (a > 127) c_sat_hi++;
      if (a < -128) c_sat_lo++;
    end
    in_x[0] = DATA_W'(x);
    in_stb  = 1'b1;
    do @(posedge clk); while (!in_ack);
    #1;
    in_stb = 1'b0;
  endtask

  initial begin
    in_stb  = 1'b0;
    in_x    = '0;
    out_ack = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // phase 1: full rate
    phase = 1;
    for (int n = 0; n < 200; n++) send(int'($urandom_range(255)) - 128);
    while (exp_q.size() != 0) @(posedge clk);
    #1;

    // phase 2: random back-pressure
    phase = 2;
    fork
      begin
        for (int n = 0; n < 200; n++) send(int'($urandom_range(255)) - 128);
        while (exp_q.size() != 0) @(posedge clk);
      end
      begin
        while (phase == 2) begin
          @(negedge clk);
          out_ack = ($urandom_range(99) < 40);
          if (exp_q.size() == 0) break;
        end
      end
    join
    #1 out_ack = 1'b1;

    // phase 3: input every 5 clocks (t > t_c, idle cycles)
    phase = 3;
    for (int n = 0; n < 50; n++) begin
      send(int'($urandom_range(255)) - 128);
      repeat (4) @(posedge clk);
      #1;
    end
    while (exp_q.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);

    checks += 9;
    if (c_replay == 0) begin failures++; $display("FIMFO replay never happened"); end
    if (c_offset == 0) begin failures++; $display("offset insertion never seen"); end
    if (c_pad == 0)    begin failures++; $display("padding slot never dropped"); end
    if (c_stall == 0)  begin failures++; $display("layer stall never happened"); end
    if (c_hold == 0)   begin failures++; $display("output hold never happened"); end
    if (c_idle == 0)   begin failures++; $display("idle beats never happened"); end
    if (c_sat_hi == 0) begin failures++; $display("positive saturation never happened"); end
    if (c_sat_lo == 0) begin failures++; $display("negative saturation never happened"); end
    if (c_tput == 0)   begin failures++; $display("rate never measured"); end
    if (n_out != 450)  begin failures++; $display("got %0d outputs", n_out); end
    finish();
  end
endmodule
