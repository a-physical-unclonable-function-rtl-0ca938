// stop_ring_osc - behavioural model of the second ring oscillator and its mode
// multiplexer, which produce the TDC sampling clock.
//
// BEHAVIOURAL MODEL. In calibration mode the flip-flops of the TDC are clocked
// by a free-running ring oscillator that is not locked to the delay-line ring;
// the phase at which it samples the delay-line ring is therefore spread evenly
// over the ring period, and the number of samples landing in a bin is
// proportional to that bin's delay. The model toggles every HALF_PERIOD_PS
// plus a uniform jitter of +/- JITTER_PS drawn from a private xorshift
// generator seeded with SEED, so that repeated calibrations of the same device
// differ slightly, as they do on hardware. In normal mode (normal_mode = 1)
// the external STOP signal is passed to the flip-flops instead.
//
// The sampling clock also clocks the PUF's digital logic in this design, so
// smp_clk runs whenever the PUF is in calibration mode.
//
// Interface: normal_mode, stop in; smp_clk out.
module stop_ring_osc #(
  parameter realtime     HALF_PERIOD_PS = 1618.034,
  parameter realtime     JITTER_PS      = 100.0,
  parameter int unsigned SEED           = 1
) (
  input  logic normal_mode,
  input  logic stop,
  output logic smp_clk
);
  timeunit 1ps; timeprecision 1fs;

  logic        run;    // enable of the gated ring, raised once after time 0
  logic        osc;    // oscillator output
  logic        nxt;    // gated, inverted output fed back into the ring
  logic [31:0] rng;

  initial begin
    osc = 1'b0;
    rng = 32'h2545f491 ^ SEED;
    run = 1'b0;
    #1 run = 1'b1;
  end

  assign nxt = run & ~osc;

  // One ring stage: the output follows the inverted output after half a
  // period with fresh jitter.
  always @(nxt) begin
    rng = rng ^ (rng << 13);
    rng = rng ^ (rng >> 17);
    rng = rng ^ (rng << 5);
    osc <= #(HALF_PERIOD_PS + JITTER_PS * (2.0 * real'(rng) / 4294967296.0 - 1.0)) nxt;
  end

  assign smp_clk = normal_mode ? stop : osc;
endmodule
