// tb_puf_variation - reproducibility and uniqueness run of the TDC PUF.
//
// NDEV simulated devices (different DEVICE_SEED values, i.e. different
// process variation) receive the same NCH challenges, each built from two
// consecutive states of an 11-bit LFSR (x^11 + x^9 + 1); challenges that
// select the last bin are skipped, since that bin is not used for responses.
// Every device answers the set NQ times. The testbench reports
//   intra-chip variation: mean fractional Hamming distance between a
//     device's first answer string and its later ones,
//   inter-chip variation: mean fractional Hamming distance between the first
//     answer strings of every pair of devices,
// both in percent. It checks every response against the reported counts and
// requires intra-chip variation to stay below inter-chip variation, and
// inter-chip variation above 25 %. The calibration is shortened to 2^S_LOG2
// samples to keep the run short; the bin counts are then relatively noisier
// than with 2^17 samples (the relative noise falls as 2^(-S_LOG2/2)), so
// intra-chip variation comes out higher than at full size: 20-30 % at 2^13
// samples with this device model, depending on the start-up phase of the
// sampling oscillator.
module tb_puf_variation;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned NDEV   = 3;
  localparam int unsigned NCH    = 16;
  localparam int unsigned NQ     = 2;
  localparam int unsigned S_LOG2 = 13;

  int checks = 0, failures = 0;
  logic [21:0] chal [NCH];
  bit          bits [NDEV][NQ][NCH];
  int          finished = 0;
  logic        rst_n = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Challenge set from the LFSR.
  initial begin
    logic [10:0] s, a;
    int n;
    s = 11'h001;
    n = 0;
    while (n < NCH) begin
      a = s;
      s = {s[9:0], s[10] ^ s[8]};
      if (a[10:8] != 3'd7 && s[10:8] != 3'd7) begin
        chal[n] = {a, s};
        n++;
      end
      s = {s[9:0], s[10] ^ s[8]};
    end
  end

  for (genvar d = 0; d < NDEV; d++) begin : g_dev
    logic smp_clk, busy, done, resp, reserved, cnt_sat, req;
    logic [2:0] tdc_code;
    logic [15:0] count0, count1;
    logic [21:0] challenge;

    tdc_puf #(.SAMPLES_LOG2(S_LOG2), .DEVICE_SEED(100 + d)) dut (
      .rst_n, .normal_mode(1'b0), .start(1'b0), .stop(1'b0), .smp_clk,
      .tdc_code, .req, .challenge, .busy, .done, .resp, .reserved, .count0,
      .count1, .cnt_sat, .coef_we(1'b0), .coef_addr(3'd0), .coef_wdata(8'd0));

    initial begin
      req = 1'b0;
      challenge = '0;
      repeat (8) @(posedge smp_clk);
      wait (rst_n);
      for (int q = 0; q < NQ; q++) begin
        for (int c = 0; c < NCH; c++) begin
          @(negedge smp_clk);
          challenge = chal[c];
          req = 1'b1;
          @(negedge smp_clk);
          req = 1'b0;
          while (!done) @(negedge smp_clk);
          bits[d][q][c] = resp;
          check(resp == !(count0 > count1), "response against counts");
        end
      end
      finished++;
    end
  end

  initial begin
    #(9_000_000_000.0);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real intra, inter;
    int hd, pairs;
    #20000;
    rst_n = 1'b1;
    wait (finished == NDEV);
    intra = 0.0;
    for (int d = 0; d < NDEV; d++)
      for (int q = 1; q < NQ; q++) begin
        hd = 0;
        for (int c = 0; c < NCH; c++) hd += int'(bits[d][0][c] != bits[d][q][c]);
        intra += real'(hd) / real'(NCH);
      end
    intra = 100.0 * intra / real'(NDEV * (NQ - 1));
    inter = 0.0;
    pairs = 0;
    for (int i = 0; i < NDEV - 1; i++)
      for (int j = i + 1; j < NDEV; j++) begin
        hd = 0;
        for (int c = 0; c < NCH; c++) hd += int'(bits[i][0][c] != bits[j][0][c]);
        inter += real'(hd) / real'(NCH);
        pairs++;
      end
    inter = 100.0 * inter / real'(pairs);
    $display("devices=%0d challenges=%0d queries=%0d samples=2^%0d", NDEV, NCH, NQ, S_LOG2);
    $display("intra-chip variation = %0.1f %%, inter-chip variation = %0.1f %%", intra, inter);
    check(intra < inter, "intra-chip below inter-chip variation");
    check(inter > 25.0, "inter-chip variation above 25 %");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
