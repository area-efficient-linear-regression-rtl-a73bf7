// phase_unwrap: phase unwrapping and decimation by two in front of the regression.
//
// The instantaneous phase is an 8-bit signed value covering -pi..pi (units of
// pi/128), so it jumps by 2*pi whenever the signal's phase crosses +-pi. The
// unwrapped phase removes those jumps: each step is the difference of two
// consecutive phases taken modulo 2*pi (an 8-bit wrapping subtraction, which
// yields -pi..pi), added to the previous unwrapped value. Unwrapping restarts
// at the first sample of each packet (start_i), whose unwrapped value is its
// instantaneous phase, so within a 512-sample packet the result stays within
// -512*pi..512*pi and fits 17 bits. Only the even samples are kept, which
// turns a 512-sample packet into the 256-sample sequence of the regression.
//
// Interface: four consecutive phases per clock (ph_i[0] first), start_i with
// the group that opens a packet, model_i passed along. Output: the two even
// samples of the group (d0_o = sample 0, d1_o = sample 2) with start_o and
// model_o, one cycle later. The four-samples-per-clock input rate, which
// gives the regression its two samples per clock, is this design's choice.
module phase_unwrap
  import linreg_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst,
  input  logic signed [PHASE_W-1:0]  ph_i [4],
  input  logic                       start_i,
  input  model_e                     model_i,
  output logic signed [D_W-1:0]      d0_o,
  output logic signed [D_W-1:0]      d1_o,
  output logic                       start_o,
  output model_e                     model_o
);

  logic signed [PHASE_W-1:0] prev_ph;      // last phase of the previous group
  logic signed [D_W-1:0]     prev_u;       // its unwrapped value
  logic signed [PHASE_W-1:0] step [4];     // wrapped differences
  logic signed [D_W-1:0]     u    [4];

  always_comb begin
    step[0] = ph_i[0] - prev_ph;
    for (int j = 1; j < 4; j++) step[j] = ph_i[j] - ph_i[j-1];
    u[0] = start_i ? D_W'(ph_i[0]) : prev_u + D_W'(step[0]);
    for (int j = 1; j < 4; j++) u[j] = u[j-1] + D_W'(step[j]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prev_ph <= '0;
      prev_u  <= '0;
      d0_o    <= '0;
      d1_o    <= '0;
      start_o <= 1'b0;
      model_o <= MODEL_LONG;
    end else begin
      prev_ph <= ph_i[3];
      prev_u  <= u[3];
      d0_o    <= u[0];
      d1_o    <= u[2];
      start_o <= start_i;
      model_o <= model_i;
    end
  end

endmodule
