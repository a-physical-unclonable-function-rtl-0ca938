// puf_delay_line - behavioural model of the PUF's multiplexer delay line.
//
// BEHAVIOURAL MODEL. 2^N_LOG2 puf_mux_stage instances in a chain; the output
// of stage i fans out to both inputs of stage i+1, and challenge bit sel[i]
// picks which of the two paths an edge takes through stage i. The path delays
// come from tdc_puf_pkg::stage_delay_ps(DEVICE_SEED, i, path), so every
// DEVICE_SEED stands for a different chip.
//
// Interface: line_in - edge entering stage 0 (from the mode multiplexer);
// sel - CI[2^N_LOG2-1:0]; taps[i] - the input node of stage i (taps[0] is
// line_in), which is what the TDC flip-flops sample; line_out - output of the
// last stage, fed back through the inverter in calibration mode. With this tap
// choice, bin k (k < 2^N_LOG2-1) of the histogram is the time an edge spends
// in stage k, and the last bin also contains the return path.
module puf_delay_line
  import tdc_puf_pkg::*;
#(
  parameter int unsigned N_LOG2      = N_LOG2_DEF,
  parameter int unsigned DEVICE_SEED = 1
) (
  input  logic                   line_in,
  input  logic [(1<<N_LOG2)-1:0] sel,
  output logic [(1<<N_LOG2)-1:0] taps,
  output logic                   line_out
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned N = 1 << N_LOG2;

  logic [N:0] node;   // node[i] = input of stage i, node[N] = line output

  assign node[0] = line_in;

  for (genvar i = 0; i < N; i++) begin : g_stage
    puf_mux_stage #(
      .D_IN0(stage_delay_ps(DEVICE_SEED, i, 0)),
      .D_IN1(stage_delay_ps(DEVICE_SEED, i, 1))
    ) u_stage (
      .in0 (node[i]),
      .in1 (node[i]),
      .sel (sel[i]),
      .y   (node[i+1])
    );
  end

  assign taps     = node[N-1:0];
  assign line_out = node[N];
endmodule
