// tdc_puf_pkg - shared constants, types and the device-variation model of the
// TDC PUF.
//
// The PUF is built around an 8-stage flash TDC whose delay line is a chain of
// 2-to-1 multiplexers. With 2^N_LOG2 stages a sub-challenge CI is
// 2^N_LOG2 + N_LOG2 bits wide: the low 2^N_LOG2 bits steer the multiplexer
// stages, the top N_LOG2 bits select the histogram bin that is counted. A full
// challenge is two sub-challenges, C0 (the former, applied first) and C1.
//
// stage_delay_ps() is not hardware. It is the process-variation model used by
// the behavioural delay-line model and by the testbenches that predict bin
// counts: every (device, stage, path) triple gets a fixed pseudo-random delay
// around a nominal value. The spread is this design's own choice.
package tdc_puf_pkg;
  timeunit 1ps; timeprecision 1fs;

  // Number of stages is 2^N_LOG2 (8 stages in the reference configuration).
  localparam int unsigned N_LOG2_DEF   = 3;
  // Bin counter width and log2 of the samples per calibration.
  localparam int unsigned CNT_W_DEF    = 16;
  localparam int unsigned SAMPLES_LOG2_DEF = 17;
  // Width of a compensation coefficient.
  localparam int unsigned COEF_W_DEF   = 8;

  // Controller states.
  typedef enum logic [2:0] {
    ST_IDLE   = 3'd0,   // waiting for a request
    ST_SETUP0 = 3'd1,   // ring stopped, CI = C0, bin counter cleared
    ST_CAL0   = 3'd2,   // 1st calibration: ring running, samples counted
    ST_LATCH0 = 3'd3,   // COUNT0 captured
    ST_SETUP1 = 3'd4,   // ring stopped, CI = C1, bin counter cleared
    ST_CAL1   = 3'd5,   // 2nd calibration
    ST_DECIDE = 3'd6    // COEF0*COUNT0 against COEF1*COUNT1
  } puf_state_e;

  // Deterministic 32-bit mixing function (used only by the variation model).
  function automatic logic [31:0] mix32(logic [31:0] x);
    logic [31:0] h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Zero-mean, unit-variance pseudo-random number for one (seed, index):
  // the sum of four uniform variates, centred and scaled.
  function automatic real variation(int unsigned seed, int unsigned idx);
    logic [31:0] h;
    real acc;
    acc = 0.0;
    h = mix32(seed * 32'h9e3779b9 + idx * 32'h85ebca6b + 32'h1234567);
    for (int r = 0; r < 4; r++) begin
      h = mix32(h + 32'h632be5ab);
      acc = acc + real'(h) / 4294967296.0;
    end
    return (acc - 2.0) * 1.7320508;
  endfunction

  // Delay in ps of fan-out path `path` (0 or 1) into multiplexer stage
  // `stage` of device `seed`: nominal 100 ps, 8 % standard deviation.
  function automatic real stage_delay_ps(int unsigned seed, int unsigned stage,
                                         int unsigned path);
    return 100.0 * (1.0 + 0.08 * variation(seed, stage * 2 + path));
  endfunction

  // Delay in ps of the return path (inverter, feedback wire and mode
  // multiplexer) of device `seed`: nominal 150 ps.
  function automatic real return_delay_ps(int unsigned seed);
    return 150.0 * (1.0 + 0.08 * variation(seed, 32'hffff));
  endfunction
endpackage
