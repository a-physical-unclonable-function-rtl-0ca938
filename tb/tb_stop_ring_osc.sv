// tb_stop_ring_osc - checks the sampling oscillator: every half period lies
// within HALF_PERIOD_PS +/- JITTER_PS, the mean is close to HALF_PERIOD_PS,
// the jitter is not zero, and normal mode passes the external STOP signal.
module tb_stop_ring_osc;
  timeunit 1ps; timeprecision 1fs;
  localparam real HP = 1618.034;
  localparam real JIT = 25.0;
  int checks = 0, failures = 0;
  logic normal_mode = 1'b0, stop = 1'b0, smp_clk;
  realtime t0, t1, tmin, tmax, sum;

  stop_ring_osc #(.HALF_PERIOD_PS(HP), .JITTER_PS(JIT), .SEED(9)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #(100_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(smp_clk);
    t0 = $realtime;
    tmin = 1.0e9; tmax = 0.0; sum = 0.0;
    for (int n = 0; n < 2000; n++) begin
      @(smp_clk);
      t1 = $realtime - t0;
      t0 = $realtime;
      sum += t1;
      if (t1 < tmin) tmin = t1;
      if (t1 > tmax) tmax = t1;
      if (n % 100 == 0)
        check(t1 >= HP - JIT - 0.01 && t1 <= HP + JIT + 0.01, $sformatf("half period %f", t1));
    end
    check(tmin >= HP - JIT - 0.01 && tmax <= HP + JIT + 0.01, "half period bounds");
    check(tmax - tmin > JIT / 2.0, "jitter present");
    check(sum / 2000.0 > HP - 2.0 && sum / 2000.0 < HP + 2.0, $sformatf("mean %f", sum / 2000.0));
    normal_mode = 1'b1;
    for (int n = 0; n < 10; n++) begin
      stop = ~stop;
      #1;
      check(smp_clk == stop, "normal mode passes STOP");
      #777;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
