// tb_bin_select_mux - checks the 8-to-1 bin multiplexer for every select value
// with random hit vectors.
module tb_bin_select_mux;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic [7:0] bin_hit;
  logic [2:0] sel;
  logic hit;

  bin_select_mux #(.N_LOG2(3)) dut (.bin_hit(bin_hit), .sel(sel), .hit(hit));

  initial begin
    #(1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      bin_hit = 8'($urandom);
      sel = 3'(n);
      #1;
      checks++;
      if (hit != ((bin_hit >> sel) & 8'd1)) begin
        failures++;
        $display("FAIL hits=%b sel=%0d hit=%b", bin_hit, sel, hit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
