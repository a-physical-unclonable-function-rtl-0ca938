// start_ring_closure - behavioural model of the inverter, feedback wire and
// mode multiplexer at the input of the PUF delay line.
//
// BEHAVIOURAL MODEL. In calibration mode (cal = 1) the inverted line output
// is fed back to the line input, so line plus closure form a ring oscillator
// whose half period is the sum of all stage delays and the return delay. In
// normal mode (cal = 0) the external START signal drives the line, as in a
// plain flash TDC; the controller also uses cal = 0 with START held low to
// stop and drain the ring before it changes the challenge bits.
//
// Interface: cal - mode select; start - external START edge; line_out - end
// of the delay line; line_in - what enters stage 0. Timing: the inverter and
// wire together take D_FB ps, the mode multiplexer D_MUX ps; the two are set
// from tdc_puf_pkg::return_delay_ps(DEVICE_SEED) in a 2:1 ratio. Reset state
// is a drained line (all nodes 0), which is what the two-state model starts in.
module start_ring_closure
  import tdc_puf_pkg::*;
#(
  parameter int unsigned DEVICE_SEED = 1
) (
  input  logic cal,
  input  logic start,
  input  logic line_out,
  output logic line_in
);
  timeunit 1ps; timeprecision 1fs;

  localparam realtime D_RET = return_delay_ps(DEVICE_SEED);
  localparam realtime D_FB  = D_RET * 2.0 / 3.0;
  localparam realtime D_MUX = D_RET / 3.0;

  logic fb;        // inverted line output after the feedback wire
  logic mux_out;
  logic mux_sel;

  initial begin
    fb      = 1'b1;
    mux_out = 1'b0;
  end

  always @(line_out) fb <= #(D_FB) ~line_out;

  assign mux_sel = cal ? fb : start;
  always @(mux_sel) mux_out <= #(D_MUX) mux_sel;

  assign line_in = mux_out;
endmodule
