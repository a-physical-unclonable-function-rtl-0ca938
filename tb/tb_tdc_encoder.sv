// tb_tdc_encoder - exhaustive check of the TDC encoder over all 256 sampled
// patterns of an 8-stage line. The reference scans for the first tap that
// differs from tap 0; result = that index - 1, or 7 when all taps agree.
module tb_tdc_encoder;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic [7:0] q;
  logic [7:0] bin_hit;
  logic [2:0] code;

  tdc_encoder #(.N_LOG2(3)) dut (.q(q), .bin_hit(bin_hit), .code(code));

  initial begin
    #(1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx;
    for (int v = 0; v < 256; v++) begin
      q = 8'(v);
      #1;
      idx = 8;
      for (int i = 7; i >= 1; i--) if (q[i] != q[0]) idx = i;
      checks++;
      if (code != 3'(idx - 1) || bin_hit != (8'b1 << (idx - 1))) begin
        failures++;
        $display("FAIL q=%b code=%0d hit=%b expected %0d", q, code, bin_hit, idx - 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
