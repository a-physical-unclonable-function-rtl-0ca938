// tb_tdc_sampler - checks that the flip-flop bank captures the tap pattern
// present at each rising sampling edge and holds it until the next one.
module tb_tdc_sampler;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [7:0] taps = '0, q, expq;

  tdc_sampler #(.N(8)) dut (.smp_clk(clk), .taps(taps), .q(q));

  always #500 clk = ~clk;

  initial begin
    #(1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      taps = 8'($urandom);
      expq = taps;
      @(posedge clk);
      #100;
      taps = ~taps;          // change after the edge: must not be seen
      #100;
      checks++;
      if (q !== expq) begin
        failures++;
        $display("FAIL q=%h expected %h", q, expq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
