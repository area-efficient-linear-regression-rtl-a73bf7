// amc_linreg_top: phase-slope stage of a modulation classifier.
//
// Instantaneous phase (8-bit, four samples per clock) is unwrapped and
// decimated by two (phase_unwrap), and each packet of 512 phases (256 after
// decimation, model MODEL_LONG) or 256 phases (128, MODEL_SHORT) is fitted
// with a straight line by the linear-regression core: a_o is the slope per
// decimated sample and b_o the value at index 0, both in units of pi/128,
// with 30 and 23 fractional bits. start_i marks the clock whose four phases
// open a packet and must come every 128 (or 64) clocks for back-to-back
// packets; model_i is sampled with it. valid_o pulses 12 cycles after the
// clock that carried the last phases of a packet.
// The regression and its widths follow the published design; the unwrapper's
// four-phases-per-clock input and the packet framing by start_i are this
// design's choices.
module amc_linreg_top
  import linreg_pkg::*;
#(
  parameter int unsigned N_LONG      = 256,
  parameter int unsigned N_SHORT     = 128,
  parameter int unsigned SHIFT_LONG  = 7,
  parameter int unsigned SHIFT_SHORT = 7
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic signed [PHASE_W-1:0]  ph_i [4],
  input  logic                       start_i,
  input  model_e                     model_i,
  output logic                       valid_o,
  output model_e                     model_o,
  output logic signed [DSP_P_W-1:0]  a_o,
  output logic signed [DSP_P_W-1:0]  b_o
);

  logic signed [D_W-1:0] d0, d1;
  logic                  start;
  model_e                model;

  phase_unwrap u_unwrap (
    .clk     (clk),
    .rst     (rst),
    .ph_i    (ph_i),
    .start_i (start_i),
    .model_i (model_i),
    .d0_o    (d0),
    .d1_o    (d1),
    .start_o (start),
    .model_o (model)
  );

  linreg_core #(
    .N_LONG(N_LONG), .N_SHORT(N_SHORT), .SHIFT_LONG(SHIFT_LONG), .SHIFT_SHORT(SHIFT_SHORT)
  ) u_core (
    .clk     (clk),
    .rst     (rst),
    .start_i (start),
    .model_i (model),
    .d0_i    (d0),
    .d1_i    (d1),
    .valid_o (valid_o),
    .model_o (model_o),
    .a_o     (a_o),
    .b_o     (b_o)
  );

endmodule
