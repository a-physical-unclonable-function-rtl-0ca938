// tb_puf_mux_stage - checks that an edge crosses the multiplexer stage after
// the delay of the selected fan-out path (D_IN0 or D_IN1).
module tb_puf_mux_stage;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic a = 1'b0, sel = 1'b0, y;
  realtime t0, t1;

  puf_mux_stage #(.D_IN0(93.5), .D_IN1(108.25)) dut (.in0(a), .in1(a), .sel(sel), .y(y));

  initial begin
    #(1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    for (int n = 0; n < 20; n++) begin
      sel = n[0];
      #500;
      t0 = $realtime;
      a = ~a;
      @(y);
      t1 = $realtime - t0;
      checks++;
      if ((t1 - (sel ? 108.25 : 93.5)) > 0.01 || (t1 - (sel ? 108.25 : 93.5)) < -0.01 || y != a) begin
        failures++;
        $display("FAIL sel=%b delay %f", sel, t1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
