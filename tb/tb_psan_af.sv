// tb_psan_af: sweeps every 17-bit accumulator value through the activation
// function (the first-layer configuration) and compares with the expected
// saturation curve: top 12 bits, clipped to [-128, 127]. A second instance
// with a 19-bit accumulator (second layer) is checked on random values.
module tb_psan_af;
  int checks = 0, failures = 0;

  logic signed [16:0] acc17;
  logic signed [7:0]  y17;
  logic signed [18:0] acc19;
  logic signed [7:0]  y19;

  psan_af #(.ACC_W(17)) dut17 (.acc(acc17), .y(y17));
  psan_af #(.ACC_W(19)) dut19 (.acc(acc19), .y(y19));

  function automatic int expect_af(int a, int accw);
    int v;
    v = a >>> (accw - 12);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  initial begin
    #100000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -65536; a < 65536; a++) begin
      acc17 = 17'(a);
      #1;
      checks++;
      if (int'(y17) != expect_af(a, 17)) begin
        failures++;
        if (failures < 10) $display("acc17=%0d got %0d expected %0d", a, y17, expect_af(a, 17));
      end
    end
    for (int n = 0; n < 20000; n++) begin
      int a;
      a = int'($urandom_range(524287)) - 262144;
      acc19 = 19'(a);
      #1;
      checks++;
      if (int'(y19) != expect_af(a, 19)) begin
        failures++;
        if (failures < 10) $display("acc19=%0d got %0d expected %0d", a, y19, expect_af(a, 19));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
