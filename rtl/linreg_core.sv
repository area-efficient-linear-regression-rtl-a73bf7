// linreg_core: linear regression of fixed-length sequences, two samples per clock.
//
// For each sequence d_0..d_{N-1} (N = N_LONG or N_SHORT, chosen per sequence)
// the core returns slope a and intercept b of the least-squares line
// d ~ a*i + b. Everything that only depends on N (the index sums and the
// division) is folded into four ROM constants per length, so the hardware is
// two accumulators and one multiply-subtract stage:
//   ACC    (1 DSP slice)  sum(d_i)
//   MACC_1 (3 DSP slices) sum(i*d_i)
//   MACC_2 (1 DSP slice)  a = K0*sum(i*d_i)/2^s - K1*sum(d_i),
//                         b = K2*sum(d_i) - K3*sum(i*d_i)/2^s
// The ACC inputs go through two registers so that both sums are complete in
// the same cycle, when the control loads them into holding registers; the
// coefficient stage works from those while the accumulators already take the
// next sequence.
//
// Interface: d0_i/d1_i are samples 2k and 2k+1 of the current sequence
// (17-bit signed, unwrapped phase in units of pi/128), one pair per clock from
// the pair that carries start_i until N/2 pairs are in. model_i is sampled
// with start_i. Results: a_o with 30 and b_o with 23 fractional bits (for the
// default parameters), both in units of the input, with model_o and a one-
// cycle valid_o. Timing: valid_o comes 11 cycles after the last pair; a new
// sequence may start the cycle after the last pair of the previous one.
// SHIFT_LONG/SHIFT_SHORT are the bits of sum(i*d_i) discarded for each model;
// equal shifts (the default) share one multiplexer input.
module linreg_core
  import linreg_pkg::*;
#(
  parameter int unsigned N_LONG      = 256,
  parameter int unsigned N_SHORT     = 128,
  parameter int unsigned SHIFT_LONG  = 7,
  parameter int unsigned SHIFT_SHORT = 7
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      start_i,
  input  model_e                    model_i,
  input  logic signed [D_W-1:0]     d0_i,
  input  logic signed [D_W-1:0]     d1_i,
  output logic                      valid_o,
  output model_e                    model_o,
  output logic signed [DSP_P_W-1:0] a_o,
  output logic signed [DSP_P_W-1:0] b_o
);

  localparam int unsigned IDX_W = $clog2(N_LONG);

  typedef struct packed {
    logic                  valid;
    logic                  first;
    logic signed [D_W-1:0] d0;
    logic signed [D_W-1:0] d1;
  } pair_t;

  logic             acc_valid, acc_first, ld, op_valid;
  logic [IDX_W-1:0] idx0, idx1;
  coef_op_e         op;
  model_e           op_model;
  pair_t [1:0]      acc_in_d;
  logic signed [SD_W-1:0]    sd, sd_q;
  logic signed [SID_W-1:0]   sid, sid_q;
  logic signed [CONST_W-1:0] k;

  lr_control #(.N_LONG(N_LONG), .N_SHORT(N_SHORT)) u_ctrl (
    .clk         (clk),
    .rst         (rst),
    .start_i     (start_i),
    .model_i     (model_i),
    .acc_valid_o (acc_valid),
    .acc_first_o (acc_first),
    .idx0_o      (idx0),
    .idx1_o      (idx1),
    .ld_o        (ld),
    .op_valid_o  (op_valid),
    .op_o        (op),
    .op_model_o  (op_model)
  );

  // align sum(d_i) with the longer MACC_1 pipeline
  always_ff @(posedge clk) begin
    if (rst) acc_in_d <= '0;
    else     acc_in_d <= {acc_in_d[0], pair_t'{valid: acc_valid, first: acc_first,
                                               d0: d0_i, d1: d1_i}};
  end

  lr_acc u_acc (
    .clk      (clk),
    .rst      (rst),
    .in_valid (acc_in_d[1].valid),
    .in_first (acc_in_d[1].first),
    .d0       (acc_in_d[1].d0),
    .d1       (acc_in_d[1].d1),
    .sum_o    (sd)
  );

  lr_macc1 #(.IDX_W(IDX_W)) u_macc1 (
    .clk      (clk),
    .rst      (rst),
    .in_valid (acc_valid),
    .in_first (acc_first),
    .d0       (d0_i),
    .d1       (d1_i),
    .idx0     (idx0),
    .idx1     (idx1),
    .sum_o    (sid)
  );

  // holding registers for the coefficient stage
  always_ff @(posedge clk) begin
    if (rst) begin
      sd_q  <= '0;
      sid_q <= '0;
    end else if (ld) begin
      sd_q  <= sd;
      sid_q <= sid;
    end
  end

  lr_const_rom #(
    .N_LONG(N_LONG), .N_SHORT(N_SHORT), .SHIFT_LONG(SHIFT_LONG), .SHIFT_SHORT(SHIFT_SHORT)
  ) u_rom (
    .model (op_model),
    .op    (op),
    .k_o   (k)
  );

  lr_macc2 #(
    .N_LONG(N_LONG), .N_SHORT(N_SHORT), .SHIFT_LONG(SHIFT_LONG), .SHIFT_SHORT(SHIFT_SHORT)
  ) u_macc2 (
    .clk       (clk),
    .rst       (rst),
    .sd        (sd_q),
    .sid       (sid_q),
    .op_valid  (op_valid),
    .op        (op),
    .model     (op_model),
    .k         (k),
    .out_valid (valid_o),
    .model_o   (model_o),
    .a_o       (a_o),
    .b_o       (b_o)
  );

endmodule
