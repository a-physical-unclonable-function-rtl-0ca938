// bin_select_mux - the 8-to-1 multiplexer in front of the bin counter.
//
// The bin-select bits of the challenge (CI[10:8] in the 8-stage PUF) choose
// which bin's hit signal reaches the counter, so the counter is incremented
// exactly when the TDC result equals the bin-select value.
//
// Interface: bin_hit - one-hot result from the encoder; sel - bin select;
// hit - the selected bin was hit. Purely combinational.
module bin_select_mux #(
  parameter int unsigned N_LOG2 = 3
) (
  input  logic [(1<<N_LOG2)-1:0] bin_hit,
  input  logic [N_LOG2-1:0]      sel,
  output logic                   hit
);
  timeunit 1ps; timeprecision 1fs;

  assign hit = bin_hit[sel];
endmodule
