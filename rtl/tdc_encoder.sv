// tdc_encoder - turns the sampled delay-line pattern into the measurement
// result of the TDC.
//
// q[i] is the sampled input of stage i. In the ring the travelling edge has
// passed every node before it and none after it, and its polarity alternates
// from lap to lap, so the result is found by comparing every tap with q[0]:
// if q[0..k] agree and q[k+1] differs, the edge was inside stage k and the
// result is k; if all taps agree, the edge was in the last stage or in the
// return path (inverter, feedback wire, mode multiplexer) and the result is
// N-1. Working with q[0] as reference makes the encoder indifferent to the
// edge polarity. A sample with a bubble (a later tap back in agreement) is
// decoded by its first transition.
//
// Interface: q in; bin_hit - one-hot, bin_hit[k] set when the result is k;
// code - the same result in binary. Purely combinational.
module tdc_encoder #(
  parameter int unsigned N_LOG2 = 3
) (
  input  logic [(1<<N_LOG2)-1:0] q,
  output logic [(1<<N_LOG2)-1:0] bin_hit,
  output logic [N_LOG2-1:0]      code
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned N = 1 << N_LOG2;

  logic [N-1:0] agree;   // agree[i]: tap i equals tap 0
  logic         run;     // taps 0..k all agree

  always_comb begin
    agree   = ~(q ^ {N{q[0]}});
    bin_hit = '0;
    run     = 1'b1;
    // The first tap that disagrees with tap 0 marks the edge.
    for (int k = 0; k < N - 1; k++) begin
      run = run & agree[k];
      if (run && !agree[k+1]) bin_hit[k] = 1'b1;
    end
    bin_hit[N-1] = &agree;
  end

  always_comb begin
    code = '0;
    for (int k = 0; k < N; k++) begin
      if (bin_hit[k]) code = N_LOG2'(k);
    end
  end
endmodule
