// tb_puf_controller - checks the challenge-response sequence of the PUF
// controller against a counter model in the testbench.
//
// The testbench plays the datapath: it keeps its own bin counter that obeys
// cnt_clr/cnt_en, with hits from a pattern that depends on the applied CI,
// and serves coefficients COEF[bin] = bin + 1 (or 1 for all bins). For every
// request it checks the number of counted cycles per calibration, that CI
// carries C0 in the first and C1 in the second calibration and never changes
// while the ring runs, the latched COUNT0/COUNT1, R, the reserved flag, the
// request-to-done latency and that a request while busy is ignored.
module tb_puf_controller;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned S_LOG2  = 6;
  localparam int unsigned LATENCY = 2 * (4 + 2 + (1 << S_LOG2) + 1) + 1;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, req = 1'b0;
  logic [21:0] challenge = '0;
  logic busy, done, resp, reserved, ring_en, cnt_clr, cnt_en;
  logic [15:0] count0, count1, count;
  logic [10:0] ci;
  logic [2:0] bin0, bin1;
  logic [7:0] coef0, coef1;
  bit plain_coef = 1'b1;
  int cyc = 0;

  puf_controller #(.SAMPLES_LOG2(S_LOG2)) dut (.*);

  always #5 clk = ~clk;

  assign coef0 = plain_coef ? 8'd1 : 8'(bin0) + 8'd1;
  assign coef1 = plain_coef ? 8'd1 : 8'(bin1) + 8'd1;

  // Datapath model: the hit probability depends on CI.
  logic [15:0] cnt_model = '0;
  int en_cycles = 0, en_c0 = 0, en_c1 = 0, ci_change_running = 0;
  logic [10:0] ci_prev;
  logic [21:0] active;
  assign count = cnt_model;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    ci_prev <= ci;
    if (ring_en && ci != ci_prev && $past(ring_en)) ci_change_running <= ci_change_running + 1;
    if (cnt_clr) cnt_model <= '0;
    else if (cnt_en) begin
      en_cycles <= en_cycles + 1;
      if (ci == active[21:11]) en_c0 <= en_c0 + 1;
      if (ci == active[10:0])  en_c1 <= en_c1 + 1;
      if (((cyc * 7 + int'(ci)) % 13) < (int'(ci) % 11)) cnt_model <= cnt_model + 1'b1;
    end
  end

  initial begin
    #(100_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int lat, k0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 40; n++) begin
      plain_coef = (n % 2 == 0);
      active = {11'($urandom), 11'($urandom)};
      if (active[21:11] == active[10:0]) active[0] = ~active[0];
      en_cycles = 0; en_c0 = 0; en_c1 = 0;
      challenge = active;
      req = 1'b1;
      @(negedge clk);
      req = 1'b0;
      challenge = ~active;
      lat = 1;
      k0 = -1;
      while (!done) begin
        if (n == 3 && lat == 20) req = 1'b1;       // request while busy
        if (n == 3 && lat == 21) req = 1'b0;
        if (dut.state == tdc_puf_pkg::ST_LATCH0) k0 = cnt_model;
        @(negedge clk);
        lat++;
      end
      check(lat == LATENCY, $sformatf("latency %0d expected %0d", lat, LATENCY));
      check(en_cycles == 2 * (1 << S_LOG2), $sformatf("counted cycles %0d", en_cycles));
      check(en_c0 == (1 << S_LOG2) && en_c1 == (1 << S_LOG2),
            $sformatf("CI during calibrations %0d %0d", en_c0, en_c1));
      check(count0 == 16'(k0), $sformatf("count0 %0d expected %0d", count0, k0));
      check(count1 == cnt_model, $sformatf("count1 %0d expected %0d", count1, cnt_model));
      if (plain_coef)
        check(resp == !(count0 > count1), "resp plain");
      else
        check(resp == !((int'(active[21:19]) + 1) * count0 > (int'(active[10:8]) + 1) * count1),
              "resp with coefficients");
      check(reserved == (active[21:19] == 3'd7 || active[10:8] == 3'd7), "reserved");
      check(ci_change_running == 0, "CI changed while ring running");
      @(negedge clk);
      check(!busy && !done, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
