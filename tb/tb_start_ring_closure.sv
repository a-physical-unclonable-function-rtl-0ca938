// tb_start_ring_closure - checks the mode multiplexer and feedback at the
// line input. Normal mode: line_in follows START after the multiplexer delay.
// Calibration mode, with the testbench closing the loop through a fixed
// 700 ps line: the ring oscillates with a half period of 700 ps plus the
// return delay; turning calibration off again drains it.
module tb_start_ring_closure;
  import tdc_puf_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  localparam int unsigned SEED = 5;
  localparam real D_RET = return_delay_ps(SEED);
  int checks = 0, failures = 0;
  logic cal = 1'b0, start = 1'b0, line_out, line_in;
  realtime t0, t1;

  start_ring_closure #(.DEVICE_SEED(SEED)) dut (.*);

  // Stand-in for the delay line: a 700 ps transport delay.
  logic lo;
  initial lo = 1'b0;
  always @(line_in) lo <= #700.0 line_in;
  assign line_out = lo;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #(10_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int edges;
    #1000;
    // normal mode
    t0 = $realtime;
    start = 1'b1;
    @(line_in);
    t1 = $realtime - t0;
    check(line_in == 1'b1 && t1 > D_RET / 3.0 - 0.01 && t1 < D_RET / 3.0 + 0.01,
          $sformatf("START to line_in %f", t1));
    #2000;
    start = 1'b0;
    #2000;
    check(line_in == 1'b0 && line_out == 1'b0, "drained after START low");
    // calibration mode: ring oscillation
    cal = 1'b1;
    fork
      @(posedge line_in);
      #5000;
    join_any
    disable fork;
    for (int n = 0; n < 10; n++) begin
      t0 = $realtime;
      fork
        @(line_in);
        #5000;
      join_any
      disable fork;
      t1 = $realtime - t0;
      check(t1 > 700.0 + D_RET - 0.01 && t1 < 700.0 + D_RET + 0.01,
            $sformatf("half period %f expected %f", t1, 700.0 + D_RET));
    end
    cal = 1'b0;
    #3000;
    edges = 0;
    fork
      begin : count_edges forever begin @(line_in); edges++; end end
      #5000;
    join_any
    disable fork;
    check(edges == 0 && line_in == 1'b0, "ring stopped when calibration off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
