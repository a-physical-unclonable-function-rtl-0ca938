// tb_puf_delay_line - launches edges into the multiplexer delay line for
// random challenge bits and checks the arrival time at every tap and at the
// line output against the sum of the selected path delays of the device.
module tb_puf_delay_line;
  import tdc_puf_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  localparam int unsigned SEED = 7;
  int checks = 0, failures = 0;
  logic line_in = 1'b0, line_out;
  logic [7:0] sel = '0, taps;
  realtime t_launch, t_arr[9];
  bit seen[9];

  puf_delay_line #(.N_LOG2(3), .DEVICE_SEED(SEED)) dut (.*);

  for (genvar i = 0; i < 8; i++) begin : g_mon
    always @(taps[i]) if (!seen[i]) begin t_arr[i] = $realtime - t_launch; seen[i] = 1; end
  end
  always @(line_out) if (!seen[8]) begin t_arr[8] = $realtime - t_launch; seen[8] = 1; end

  initial begin
    #(10_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real expt;
    #1000;
    for (int n = 0; n < 30; n++) begin
      sel = 8'($urandom);
      #2000;
      for (int i = 0; i < 9; i++) seen[i] = 0;
      t_launch = $realtime;
      line_in = ~line_in;
      #2000;
      expt = 0.0;
      for (int i = 0; i <= 8; i++) begin
        checks++;
        if (!seen[i] || (t_arr[i] - expt) > 0.01 || (t_arr[i] - expt) < -0.01) begin
          failures++;
          $display("FAIL sel=%b node %0d at %f expected %f", sel, i, t_arr[i], expt);
        end
        if (i < 8) expt += stage_delay_ps(SEED, i, sel[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
