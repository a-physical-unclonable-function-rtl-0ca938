// tdc_puf - physical unclonable function built from a flash TDC with
// histogram-based linearity self-calibration (8-stage configuration).
//
// The delay line of the TDC is a chain of 2-to-1 multiplexers (CI[7:0] pick a
// fan-out path in every stage). In calibration mode the line is closed into a
// ring oscillator and sampled by flip-flops clocked from a second, unrelated
// ring oscillator, so the sampled edge position is spread over the ring
// period. The encoder turns each sample into a bin number, the 8-to-1
// multiplexer (CI[10:8]) passes the hits of one bin to a 16-bit counter, and
// after 2^17 samples the counter holds that bin's length, i.e. the relative
// delay of one stage on the chosen path. The controller does this for both
// halves of a 22-bit challenge and answers R = 0 if COEF0*COUNT0 >
// COEF1*COUNT1, otherwise 1.
//
// The delay line, the ring closure and the sampling oscillator are
// behavioural timing models (their DEVICE_SEED picks the simulated process
// variation); on a chip or FPGA they are multiplexers, an inverter and a ring
// oscillator. All digital logic runs on the sampling clock, which is brought
// out as smp_clk for the host: rst_n, req, challenge and the coefficient
// port are synchronous to it.
//
// Normal mode (normal_mode = 1) turns the structure back into a plain flash
// TDC: START drives the line, STOP clocks the flip-flops, and tdc_code gives
// the measured interval in stage delays one cycle after each STOP edge. No
// response may be requested in normal mode, since the digital logic is then
// clocked by STOP.
module tdc_puf
  import tdc_puf_pkg::*;
#(
  parameter int unsigned N_LOG2       = N_LOG2_DEF,
  parameter int unsigned CNT_W        = CNT_W_DEF,
  parameter int unsigned SAMPLES_LOG2 = SAMPLES_LOG2_DEF,
  parameter int unsigned COEF_W       = COEF_W_DEF,
  parameter int unsigned DEVICE_SEED  = 1,
  localparam int unsigned N    = 1 << N_LOG2,
  localparam int unsigned CI_W = N + N_LOG2
) (
  input  logic                rst_n,
  // TDC mode and normal-mode measurement inputs
  input  logic                normal_mode,
  input  logic                start,
  input  logic                stop,
  output logic                smp_clk,
  output logic [N_LOG2-1:0]   tdc_code,
  // challenge / response
  input  logic                req,
  input  logic [2*CI_W-1:0]   challenge,
  output logic                busy,
  output logic                done,
  output logic                resp,
  output logic                reserved,
  output logic [CNT_W-1:0]    count0,
  output logic [CNT_W-1:0]    count1,
  output logic                cnt_sat,
  // compensation coefficients
  input  logic                coef_we,
  input  logic [N_LOG2-1:0]   coef_addr,
  input  logic [COEF_W-1:0]   coef_wdata
);
  timeunit 1ps; timeprecision 1fs;

  logic [CI_W-1:0]   ci;
  logic              ring_en, cnt_clr, cnt_en, hit;
  logic              line_in, line_out;
  logic [N-1:0]      taps, q, bin_hit;
  logic [CNT_W-1:0]  count;
  logic [N_LOG2-1:0] bin0, bin1;
  logic [COEF_W-1:0] coef0, coef1;

  // Analog part (behavioural models).
  start_ring_closure #(.DEVICE_SEED(DEVICE_SEED)) u_closure (
    .cal      (ring_en && !normal_mode),
    .start    (start),
    .line_out (line_out),
    .line_in  (line_in)
  );

  puf_delay_line #(.N_LOG2(N_LOG2), .DEVICE_SEED(DEVICE_SEED)) u_line (
    .line_in  (line_in),
    .sel      (ci[N-1:0]),
    .taps     (taps),
    .line_out (line_out)
  );

  stop_ring_osc #(.SEED(DEVICE_SEED)) u_stop_osc (
    .normal_mode (normal_mode),
    .stop        (stop),
    .smp_clk     (smp_clk)
  );

  // Digital part.
  tdc_sampler #(.N(N)) u_sampler (
    .smp_clk (smp_clk),
    .taps    (taps),
    .q       (q)
  );

  tdc_encoder #(.N_LOG2(N_LOG2)) u_encoder (
    .q       (q),
    .bin_hit (bin_hit),
    .code    (tdc_code)
  );

  bin_select_mux #(.N_LOG2(N_LOG2)) u_bin_mux (
    .bin_hit (bin_hit),
    .sel     (ci[CI_W-1 -: N_LOG2]),
    .hit     (hit)
  );

  bin_counter #(.CNT_W(CNT_W)) u_counter (
    .clk   (smp_clk),
    .rst_n (rst_n),
    .clr   (cnt_clr),
    .en    (cnt_en),
    .hit   (hit),
    .count (count),
    .sat   (cnt_sat)
  );

  coef_table #(.N_LOG2(N_LOG2), .COEF_W(COEF_W)) u_coef (
    .clk    (smp_clk),
    .rst_n  (rst_n),
    .we     (coef_we),
    .waddr  (coef_addr),
    .wdata  (coef_wdata),
    .raddr0 (bin0),
    .raddr1 (bin1),
    .coef0  (coef0),
    .coef1  (coef1)
  );

  puf_controller #(
    .N_LOG2       (N_LOG2),
    .CNT_W        (CNT_W),
    .SAMPLES_LOG2 (SAMPLES_LOG2),
    .COEF_W       (COEF_W)
  ) u_ctrl (
    .clk       (smp_clk),
    .rst_n     (rst_n),
    .req       (req),
    .challenge (challenge),
    .busy      (busy),
    .done      (done),
    .resp      (resp),
    .reserved  (reserved),
    .count0    (count0),
    .count1    (count1),
    .ci        (ci),
    .ring_en   (ring_en),
    .cnt_clr   (cnt_clr),
    .cnt_en    (cnt_en),
    .count     (count),
    .bin0      (bin0),
    .bin1      (bin1),
    .coef0     (coef0),
    .coef1     (coef1)
  );
endmodule
