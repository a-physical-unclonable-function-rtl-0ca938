// tdc_sampler - the flip-flop bank of the flash TDC.
//
// One D flip-flop per delay-line stage. Each samples the input node of its
// stage on the rising edge of the measured signal (the STOP edge, in
// calibration mode the second ring oscillator), freezing the position of the
// travelling edge as a thermometer-like pattern. There is no reset: the value
// is overwritten on every sampling edge and the controller discards the first
// samples after it starts the ring.
//
// Interface: smp_clk - sampling clock; taps - delay-line nodes; q - sampled
// pattern, valid one cycle after the edge.
module tdc_sampler #(
  parameter int unsigned N = 8
) (
  input  logic         smp_clk,
  input  logic [N-1:0] taps,
  output logic [N-1:0] q
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge smp_clk) q <= taps;
endmodule
