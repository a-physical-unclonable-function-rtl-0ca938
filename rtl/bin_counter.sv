// bin_counter - counts the length of one histogram bin.
//
// During a calibration the counter is incremented on every sampling cycle in
// which the selected bin was hit, so after 2^SAMPLES_LOG2 samples it holds the
// bin length, which is proportional to the delay of that bin's stage. The
// counter saturates at its maximum instead of wrapping, so an overlong bin
// still compares as large; that is this design's choice.
//
// Interface: clr - synchronous clear (wins over en); en - sampling window
// open; hit - selected bin hit this cycle; count - current bin length;
// sat - the counter has reached its maximum. One cycle latency from hit to
// count.
module bin_counter #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic             hit,
  output logic [CNT_W-1:0] count,
  output logic             sat
);
  timeunit 1ps; timeprecision 1fs;

  assign sat = &count;

  always_ff @(posedge clk) begin
    if (!rst_n || clr)          count <= '0;
    else if (en && hit && !sat) count <= count + 1'b1;
  end
endmodule
