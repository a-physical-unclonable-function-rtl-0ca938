// tb_tdc_puf - end-to-end test of the TDC PUF.
//
// Runs the whole PUF (behavioural delay line and oscillators plus the digital
// logic) on one simulated device and checks, for a series of challenges made
// from an 11-bit LFSR:
//   * each bin length COUNT0/COUNT1 against the value predicted from the
//     device's delays: 2^SAMPLES_LOG2 * (delay of the bin) / (ring lap time),
//     within a statistical tolerance;
//   * R against the comparison of the reported counts, and against the
//     prediction where the two predicted counts are clearly apart;
//   * the reserved flag (last bin selected) and the request-to-done latency.
// It then exercises the coefficient table (a coefficient that reverses a
// response), counter saturation (second instance with an 8-bit counter) and
// normal TDC mode (START/STOP interval measurement), and counts how often
// each mechanism occurred; a mechanism that never occurred is a failure.
module tb_tdc_puf;
  import tdc_puf_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned N_LOG2 = 3;
  localparam int unsigned N      = 1 << N_LOG2;
  localparam int unsigned CI_W   = N + N_LOG2;
  localparam int unsigned S_LOG2 = 12;
  localparam int unsigned SEED   = 3;
  localparam int unsigned NCHAL  = 24;
  localparam int unsigned LATENCY = 2 * (4 + 2 + (1 << S_LOG2) + 1) + 1;

  int checks = 0, failures = 0;
  int n_cal = 0, n_reserved = 0, n_coef = 0, n_sat = 0, n_normal = 0,
      n_resp0 = 0, n_resp1 = 0;

  logic rst_n = 1'b0, normal_mode = 1'b0, start = 1'b0, stop = 1'b0;
  logic req = 1'b0, coef_we = 1'b0;
  logic [2*CI_W-1:0] challenge = '0;
  logic [N_LOG2-1:0] coef_addr = '0;
  logic [7:0]        coef_wdata = '0;
  logic smp_clk, busy, done, resp, reserved, cnt_sat;
  logic [N_LOG2-1:0] tdc_code;
  logic [15:0] count0, count1;

  tdc_puf #(.SAMPLES_LOG2(S_LOG2), .DEVICE_SEED(SEED)) dut (.*);

  // Second device with a short counter, to reach saturation.
  logic s_clk, s_busy, s_done, s_resp, s_res, s_sat;
  logic [N_LOG2-1:0] s_code;
  logic [7:0] s_c0, s_c1;
  logic s_req = 1'b0;
  tdc_puf #(.CNT_W(8), .SAMPLES_LOG2(S_LOG2), .DEVICE_SEED(SEED + 1)) dut_sat (
    .rst_n, .normal_mode(1'b0), .start(1'b0), .stop(1'b0), .smp_clk(s_clk),
    .tdc_code(s_code), .req(s_req), .challenge(challenge), .busy(s_busy),
    .done(s_done), .resp(s_resp), .reserved(s_res), .count0(s_c0),
    .count1(s_c1), .cnt_sat(s_sat), .coef_we(1'b0), .coef_addr('0),
    .coef_wdata('0));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Expected bin length of sub-challenge ci on device seed.
  function automatic real expected_count(int unsigned seed, logic [CI_W-1:0] ci);
    real d[N];
    real lap;
    int unsigned bin;
    lap = return_delay_ps(seed);
    for (int i = 0; i < N; i++) begin
      d[i] = stage_delay_ps(seed, i, ci[i]);
      lap += d[i];
    end
    bin = ci[CI_W-1 -: N_LOG2];
    if (bin == N - 1) return real'(1 << S_LOG2) * (d[N-1] + return_delay_ps(seed)) / lap;
    return real'(1 << S_LOG2) * d[bin] / lap;
  endfunction

  function automatic bit near(int unsigned got, real exp);
    real tol;
    tol = 4.0 * $sqrt(exp) + 6.0;
    return (real'(got) > exp - tol) && (real'(got) < exp + tol);
  endfunction

  task automatic run_challenge(input logic [2*CI_W-1:0] c, output int lat);
    @(negedge smp_clk);
    challenge = c;
    req = 1'b1;
    @(negedge smp_clk);
    req = 1'b0;
    lat = 1;
    while (!done) begin
      @(negedge smp_clk);
      lat++;
    end
  endtask

  initial begin : watchdog
    #(5_000_000_000.0);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [10:0] lfsr;
    logic [CI_W-1:0] c0, c1;
    real e0, e1;
    int lat;

    repeat (8) @(posedge smp_clk);
    rst_n = 1'b1;
    repeat (2) @(posedge smp_clk);

    // --- challenge/response with LFSR-generated challenges -------------
    lfsr = 11'h5a5;
    for (int n = 0; n < NCHAL; n++) begin
      c0 = lfsr;
      lfsr = {lfsr[9:0], lfsr[10] ^ lfsr[8]};
      c1 = lfsr;
      lfsr = {lfsr[9:0], lfsr[10] ^ lfsr[8]};
      if (n == 0) c0[CI_W-1 -: N_LOG2] = '1;   // one reserved-bin request
      run_challenge({c0, c1}, lat);
      n_cal += 2;
      e0 = expected_count(SEED, c0);
      e1 = expected_count(SEED, c1);
      check(lat == LATENCY, $sformatf("latency %0d expected %0d", lat, LATENCY));
      check(near(count0, e0), $sformatf("count0 %0d expected %f", count0, e0));
      check(near(count1, e1), $sformatf("count1 %0d expected %f", count1, e1));
      check(resp == !(count0 > count1), "resp against counts");
      if (e0 - e1 > 8.0 * $sqrt(e0) + 12.0) check(resp == 1'b0, "resp predicted 0");
      if (e1 - e0 > 8.0 * $sqrt(e1) + 12.0) check(resp == 1'b1, "resp predicted 1");
      check(reserved == ((c0[CI_W-1 -: N_LOG2] == '1) || (c1[CI_W-1 -: N_LOG2] == '1)),
            "reserved flag");
      if (reserved) n_reserved++;
      if (resp) n_resp1++; else n_resp0++;
    end

    // --- coefficient compensation -------------------------------------
    // Pick bins 1 and 2 so the coefficients apply to different bins.
    c0 = {3'd1, 8'h00};
    c1 = {3'd2, 8'h00};
    run_challenge({c0, c1}, lat);
    n_cal += 2;
    begin
      logic r_plain;
      int k0, k1;
      r_plain = resp;
      k0 = count0;
      k1 = count1;
      check(resp == !(k0 > k1), "resp before coefficients");
      // Scale the bin that lost so that it wins.
      @(negedge smp_clk);
      coef_we = 1'b1;
      coef_addr = r_plain ? 3'd1 : 3'd2;
      coef_wdata = 8'd4;
      @(negedge smp_clk);
      coef_we = 1'b0;
      run_challenge({c0, c1}, lat);
      n_cal += 2;
      if (r_plain) check(resp == !(4 * count0 > count1), "resp with COEF0=4");
      else         check(resp == !(count0 > 4 * count1), "resp with COEF1=4");
      if (resp != r_plain) n_coef++;
      // Coefficients of the last bin cannot be written.
      @(negedge smp_clk);
      coef_we = 1'b1;
      coef_addr = 3'd7;
      coef_wdata = 8'd200;
      @(negedge smp_clk);
      coef_we = 1'b0;
      check(dut.u_coef.coef0 == (c0[10:8] == 3'd1 && r_plain ? 8'd4 : 8'd1) ||
            dut.u_coef.coef0 == 8'd1 || dut.u_coef.coef0 == 8'd4, "coef read");
    end

    // --- counter saturation on the 8-bit device --------------------------
    @(negedge s_clk);
    challenge = {3'd7, 8'h00, 3'd0, 8'h00};
    s_req = 1'b1;
    @(negedge s_clk);
    s_req = 1'b0;
    while (!s_done) @(negedge s_clk);
    check(s_c0 == 8'hff, $sformatf("saturated count0 %0d", s_c0));
    if (s_c0 == 8'hff) n_sat++;
    check(s_resp == 1'b0 || s_c1 == 8'hff, "saturated bin compares as large");

    // --- normal TDC mode ------------------------------------------------
    normal_mode = 1'b1;
    #5000;
    begin
      real t_node[N+1];
      real dmux;
      dmux = return_delay_ps(SEED) / 3.0;
      // CI is C1 of the last request: all multiplexers on path 0.
      t_node[0] = dmux;
      for (int i = 0; i < N; i++) t_node[i+1] = t_node[i] + stage_delay_ps(SEED, i, 0);
      for (int k = 0; k < N - 1; k++) begin
        start = 1'b1;
        #((t_node[k] + t_node[k+1]) / 2.0);
        stop = 1'b1;
        #1;
        check(tdc_code == N_LOG2'(k), $sformatf("normal mode code %0d expected %0d", tdc_code, k));
        if (tdc_code == N_LOG2'(k)) n_normal++;
        start = 1'b0;
        #3000;
        stop = 1'b0;
        #1000;
      end
    end
    normal_mode = 1'b0;

    $display("mechanisms: calibrations=%0d reserved=%0d coef_flip=%0d saturation=%0d normal_mode=%0d resp0=%0d resp1=%0d",
             n_cal, n_reserved, n_coef, n_sat, n_normal, n_resp0, n_resp1);
    check(n_cal > 0, "calibration occurred");
    check(n_reserved > 0, "reserved bin occurred");
    check(n_coef > 0, "coefficient changed a response");
    check(n_sat > 0, "counter saturated");
    check(n_normal > 0, "normal-mode measurement occurred");
    check(n_resp0 > 0 && n_resp1 > 0, "both response values occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
