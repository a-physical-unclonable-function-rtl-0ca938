// coef_table - compensation coefficients COEF[i] for the histogram bins.
//
// When the stages differ systematically in delay, each bin i that can take
// part in a response (0 <= i <= 2^N_LOG2-2) gets a coefficient that scales
// its count before the two counts are compared. The table is a small
// register file written by the host; every entry resets to 1, which gives the
// plain comparison COUNT0 > COUNT1. The last bin also holds the return path
// and is not used for responses; reads of it return 1.
//
// Interface: we/waddr/wdata - write port; raddr0/raddr1 - the bins of C0 and
// C1; coef0/coef1 - combinational read data.
module coef_table #(
  parameter int unsigned N_LOG2 = 3,
  parameter int unsigned COEF_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [N_LOG2-1:0] waddr,
  input  logic [COEF_W-1:0] wdata,
  input  logic [N_LOG2-1:0] raddr0,
  input  logic [N_LOG2-1:0] raddr1,
  output logic [COEF_W-1:0] coef0,
  output logic [COEF_W-1:0] coef1
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned NBINS = (1 << N_LOG2) - 1;  // bins with a coefficient
  localparam logic [N_LOG2-1:0] LAST = N_LOG2'(NBINS);

  logic [COEF_W-1:0] coef [NBINS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NBINS; i++) coef[i] <= COEF_W'(1);
    end else if (we && waddr != LAST) begin
      coef[waddr] <= wdata;
    end
  end

  assign coef0 = (raddr0 == LAST) ? COEF_W'(1) : coef[raddr0];
  assign coef1 = (raddr1 == LAST) ? COEF_W'(1) : coef[raddr1];
endmodule
