// puf_mux_stage - behavioural model of one 2-to-1 multiplexer stage of the
// PUF delay line.
//
// BEHAVIOURAL MODEL (not synthesizable as a timing element): on silicon or an
// FPGA this is a plain 2-to-1 multiplexer whose two inputs are both wired to
// the previous stage's output. What matters for the PUF is that the two
// fan-out paths are ideally equal but differ by process variation. The model
// gives each path its own transport delay (D_IN0, D_IN1, in ps) and lets
// `sel` (one challenge bit CI[i]) choose which delayed copy drives `y`.
//
// Interface: in0/in1 - the two fan-out copies of the previous stage output;
// sel - challenge bit; y - stage output. Timing: y follows in<sel> after
// D_IN<sel> ps. The internal path nodes start at 0, matching a drained line.
module puf_mux_stage #(
  parameter realtime D_IN0 = 100.0,
  parameter realtime D_IN1 = 100.0
) (
  input  logic in0,
  input  logic in1,
  input  logic sel,
  output logic y
);
  timeunit 1ps; timeprecision 1fs;

  logic p0, p1;

  initial begin
    p0 = 1'b0;
    p1 = 1'b0;
  end

  // Each fan-out path delays its copy of the edge.
  always @(in0) p0 <= #(D_IN0) in0;
  always @(in1) p1 <= #(D_IN1) in1;

  assign y = sel ? p1 : p0;
endmodule
