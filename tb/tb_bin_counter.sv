// tb_bin_counter - random clear/enable/hit traffic against a reference count,
// on a 16-bit counter and on a 4-bit one that must saturate at 15.
module tb_bin_counter;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0, hit = 1'b0;
  logic [15:0] count;
  logic [3:0]  count4;
  logic sat, sat4;
  int ref16, ref4, n_sat = 0;

  bin_counter #(.CNT_W(16)) dut   (.clk, .rst_n, .clr, .en, .hit, .count(count),  .sat(sat));
  bin_counter #(.CNT_W(4))  dut4  (.clk, .rst_n, .clr, .en, .hit, .count(count4), .sat(sat4));

  always #5 clk = ~clk;

  initial begin
    #(1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    ref16 = 0;
    ref4 = 0;
    for (int n = 0; n < 3000; n++) begin
      clr = ($urandom_range(0, 199) == 0);
      en  = ($urandom_range(0, 9) != 0);
      hit = $urandom_range(0, 1);
      @(posedge clk);
      if (clr) begin
        ref16 = 0;
        ref4 = 0;
      end else if (en && hit) begin
        if (ref16 < 65535) ref16++;
        if (ref4 < 15) ref4++;
      end
      @(negedge clk);
      checks++;
      if (count != 16'(ref16) || count4 != 4'(ref4) || sat4 != (ref4 == 15) || sat) begin
        failures++;
        $display("FAIL count=%0d/%0d count4=%0d/%0d", count, ref16, count4, ref4);
      end
      if (sat4) n_sat++;
    end
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("FAIL saturation never reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
