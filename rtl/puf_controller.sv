// puf_controller - sequences one challenge-response evaluation of the TDC PUF.
//
// A challenge is two sub-challenges, C0 = challenge[2*CI_W-1:CI_W] (applied
// first) and C1 = challenge[CI_W-1:0]. For each one the controller
//   1. stops the delay-line ring (ring_en = 0), applies the sub-challenge to
//      CI and clears the bin counter, for SETTLE_CYCLES cycles, so the ring
//      drains and no glitch from the changing multiplexers is left in it;
//   2. restarts the ring and, after WARMUP_CYCLES cycles that fill the
//      sampling pipeline, opens the counting window for exactly
//      2^SAMPLES_LOG2 sampling cycles (one calibration);
//   3. keeps the bin length: COUNT0 after the first calibration, COUNT1 after
//      the second.
// Finally it computes R = 0 if COEF0*COUNT0 > COEF1*COUNT1, else R = 1, where
// COEF0/COEF1 are the coefficients of the bins chosen by C0 and C1.
// The step sequence and the comparison follow the PUF description; the drain
// and warm-up phases, the bit order of the challenge and the handshake are
// this design's own choices.
//
// Interface: req (one-cycle pulse, accepted when idle) with challenge; busy
// while evaluating; done pulses for one cycle with resp, count0 and count1
// valid (they hold until the next request); reserved is set with done when a
// sub-challenge selected the last bin, whose length also contains the
// inverter, feedback wire and mode multiplexer and so should not be used for a
// response. Latency: 2*(SETTLE_CYCLES + WARMUP_CYCLES + 2^SAMPLES_LOG2 + 1)
// + 1 cycles from the cycle in which req is high to the cycle in which done is
// high.
module puf_controller
  import tdc_puf_pkg::*;
#(
  parameter int unsigned N_LOG2        = N_LOG2_DEF,
  parameter int unsigned CNT_W         = CNT_W_DEF,
  parameter int unsigned SAMPLES_LOG2  = SAMPLES_LOG2_DEF,
  parameter int unsigned COEF_W        = COEF_W_DEF,
  parameter int unsigned SETTLE_CYCLES = 4,
  parameter int unsigned WARMUP_CYCLES = 2,
  localparam int unsigned N    = 1 << N_LOG2,
  localparam int unsigned CI_W = N + N_LOG2
) (
  input  logic                clk,
  input  logic                rst_n,
  // host side
  input  logic                req,
  input  logic [2*CI_W-1:0]   challenge,
  output logic                busy,
  output logic                done,
  output logic                resp,
  output logic                reserved,
  output logic [CNT_W-1:0]    count0,
  output logic [CNT_W-1:0]    count1,
  // PUF datapath side
  output logic [CI_W-1:0]     ci,
  output logic                ring_en,
  output logic                cnt_clr,
  output logic                cnt_en,
  input  logic [CNT_W-1:0]    count,
  output logic [N_LOG2-1:0]   bin0,
  output logic [N_LOG2-1:0]   bin1,
  input  logic [COEF_W-1:0]   coef0,
  input  logic [COEF_W-1:0]   coef1
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned TMR_W = SAMPLES_LOG2 + 2;
  localparam logic [TMR_W-1:0] SETTLE_LAST = TMR_W'(SETTLE_CYCLES - 1);
  localparam logic [TMR_W-1:0] WIN_FIRST   = TMR_W'(WARMUP_CYCLES);
  localparam logic [TMR_W-1:0] WIN_LAST    =
    TMR_W'(WARMUP_CYCLES) + (TMR_W'(1) << SAMPLES_LOG2) - TMR_W'(1);
  localparam logic [N_LOG2-1:0] LAST_BIN  = N_LOG2'(N - 1);

  puf_state_e        state;
  logic [TMR_W-1:0]  timer;
  logic [2*CI_W-1:0] ch_q;
  logic [CI_W-1:0]   c0, c1;
  logic              second;

  assign c0 = ch_q[2*CI_W-1:CI_W];
  assign c1 = ch_q[CI_W-1:0];
  assign bin0 = c0[CI_W-1 -: N_LOG2];
  assign bin1 = c1[CI_W-1 -: N_LOG2];

  assign second  = state inside {ST_SETUP1, ST_CAL1, ST_DECIDE};
  assign ci      = second ? c1 : c0;
  assign ring_en = state inside {ST_CAL0, ST_CAL1};
  assign cnt_clr = state inside {ST_SETUP0, ST_SETUP1};
  assign cnt_en  = ring_en && timer >= WIN_FIRST;
  assign busy    = state != ST_IDLE;

  // Products for the decision; widths hold the full product.
  logic [COEF_W+CNT_W-1:0] prod0, prod1;
  assign prod0 = (COEF_W+CNT_W)'(coef0) * (COEF_W+CNT_W)'(count0);
  assign prod1 = (COEF_W+CNT_W)'(coef1) * (COEF_W+CNT_W)'(count);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      timer    <= '0;
      ch_q     <= '0;
      done     <= 1'b0;
      resp     <= 1'b0;
      reserved <= 1'b0;
      count0   <= '0;
      count1   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          if (req) begin
            ch_q  <= challenge;
            timer <= '0;
            state <= ST_SETUP0;
          end
        end
        ST_SETUP0, ST_SETUP1: begin
          if (timer == SETTLE_LAST) begin
            timer <= '0;
            state <= (state == ST_SETUP0) ? ST_CAL0 : ST_CAL1;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        ST_CAL0, ST_CAL1: begin
          if (timer == WIN_LAST) begin
            timer <= '0;
            state <= (state == ST_CAL0) ? ST_LATCH0 : ST_DECIDE;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        ST_LATCH0: begin
          count0 <= count;
          state  <= ST_SETUP1;
        end
        ST_DECIDE: begin
          count1   <= count;
          resp     <= !(prod0 > prod1);
          reserved <= (bin0 == LAST_BIN) || (bin1 == LAST_BIN);
          done     <= 1'b1;
          state    <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // The multiplexer stages must never change while the ring is running.
  a_ci_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (ring_en && $past(ring_en)) |-> $stable(ci));
  // Counting only happens inside a calibration.
  a_cnt_in_cal: assert property (@(posedge clk) disable iff (!rst_n)
    cnt_en |-> ring_en);
endmodule
