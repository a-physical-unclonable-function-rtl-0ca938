// tb_tdc_puf_full - one complete challenge-response evaluation of the TDC PUF
// at its default size: 8 stages, 22-bit challenge, 2^17 samples per
// calibration, 16-bit bin counter.
//
// Checks COUNT0 and COUNT1 against the bin lengths predicted from the
// simulated device's delays, R against the counts, and the request-to-done
// latency of 2*(4 + 2 + 2^17 + 1) + 1 sampling cycles.
module tb_tdc_puf_full;
  import tdc_puf_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned CI_W    = 11;
  localparam int unsigned LATENCY = 2 * (4 + 2 + (1 << 17) + 1) + 1;

  int checks = 0, failures = 0;
  logic rst_n = 1'b0, req = 1'b0;
  logic [2*CI_W-1:0] challenge = '0;
  logic smp_clk, busy, done, resp, reserved, cnt_sat;
  logic [2:0] tdc_code;
  logic [15:0] count0, count1;

  tdc_puf dut (
    .rst_n, .normal_mode(1'b0), .start(1'b0), .stop(1'b0), .smp_clk,
    .tdc_code, .req, .challenge, .busy, .done, .resp, .reserved, .count0,
    .count1, .cnt_sat, .coef_we(1'b0), .coef_addr(3'd0), .coef_wdata(8'd0));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Predicted bin length for sub-challenge ci of device 1 (the default).
  function automatic real expected_count(logic [CI_W-1:0] ci);
    real d[8];
    real lap;
    lap = return_delay_ps(1);
    for (int i = 0; i < 8; i++) begin
      d[i] = stage_delay_ps(1, i, ci[i]);
      lap += d[i];
    end
    return 131072.0 * d[ci[10:8]] / lap;
  endfunction

  initial begin
    #(2_000_000_000.0);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    real e0, e1;
    logic [CI_W-1:0] c0, c1;
    c0 = {3'd2, 8'b1011_0010};
    c1 = {3'd5, 8'b0110_1101};
    e0 = expected_count(c0);
    e1 = expected_count(c1);
    repeat (8) @(posedge smp_clk);
    rst_n = 1'b1;
    @(negedge smp_clk);
    challenge = {c0, c1};
    req = 1'b1;
    @(negedge smp_clk);
    req = 1'b0;
    lat = 1;
    while (!done) begin
      @(negedge smp_clk);
      lat++;
    end
    $display("COUNT0=%0d (predicted %0.1f) COUNT1=%0d (predicted %0.1f) R=%0d latency=%0d",
             count0, e0, count1, e1, resp, lat);
    check(lat == LATENCY, "latency");
    check(real'(count0) > e0 * 0.98 - 30.0 && real'(count0) < e0 * 1.02 + 30.0, "count0");
    check(real'(count1) > e1 * 0.98 - 30.0 && real'(count1) < e1 * 1.02 + 30.0, "count1");
    check(resp == !(count0 > count1), "resp against counts");
    check(!reserved && !cnt_sat, "flags");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
