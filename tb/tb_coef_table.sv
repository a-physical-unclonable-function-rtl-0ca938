// tb_coef_table - checks reset values (all 1), writes and reads through both
// read ports against a reference array, and that the last bin always reads 1.
module tb_coef_table;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [2:0] waddr = '0, raddr0 = '0, raddr1 = '0;
  logic [7:0] wdata = '0, coef0, coef1;
  logic [7:0] model [8];

  coef_table #(.N_LOG2(3), .COEF_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) model[i] = 8'd1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      we = $urandom_range(0, 1);
      waddr = 3'($urandom);
      wdata = 8'($urandom);
      raddr0 = 3'($urandom);
      raddr1 = 3'($urandom);
      #1;
      checks++;
      if (coef0 != model[raddr0] || coef1 != model[raddr1]) begin
        failures++;
        $display("FAIL read %0d:%0d (%0d) %0d:%0d (%0d)", raddr0, coef0, model[raddr0],
                 raddr1, coef1, model[raddr1]);
      end
      @(posedge clk);
      if (we && waddr != 3'd7) model[waddr] = wdata;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
