// lr_const_rom: the constant ROM of the coefficient stage.
//
// Holds, for each of the two sequence-length models, the four 18-bit factors
// (N/D), (S1/D), (S2/D), (S1/D) that multiply sum(i*d_i) and sum(d_i), each
// scaled by the power of two chosen in linreg_pkg::lr_const. The contents are
// computed at elaboration from the sequence lengths and the number of bits
// discarded from sum(i*d_i) for each model, so a different length only needs
// new parameter values. For the defaults (256 and 128 samples, 7 bits
// discarded for both) the words are 98306, 97921, 130307, 97921 (256 model)
// and 98310, 48771, 64774, 97542 (128 model).
//
// Interface: model and op address the word; k_o is combinational
// (a distributed ROM in front of the DSP slice's B input register).
module lr_const_rom
  import linreg_pkg::*;
#(
  parameter int unsigned N_LONG      = 256,
  parameter int unsigned N_SHORT     = 128,
  parameter int unsigned SHIFT_LONG  = 7,
  parameter int unsigned SHIFT_SHORT = 7
) (
  input  model_e                     model,
  input  coef_op_e                   op,
  output logic signed [CONST_W-1:0]  k_o
);

  typedef logic signed [CONST_W-1:0] word_t;

  localparam word_t ROM [2][4] = '{
    '{lr_const(N_LONG,  SHIFT_LONG,  OP_A_SID), lr_const(N_LONG,  SHIFT_LONG,  OP_A_SD),
      lr_const(N_LONG,  SHIFT_LONG,  OP_B_SD),  lr_const(N_LONG,  SHIFT_LONG,  OP_B_SID)},
    '{lr_const(N_SHORT, SHIFT_SHORT, OP_A_SID), lr_const(N_SHORT, SHIFT_SHORT, OP_A_SD),
      lr_const(N_SHORT, SHIFT_SHORT, OP_B_SD),  lr_const(N_SHORT, SHIFT_SHORT, OP_B_SID)}
  };

  assign k_o = ROM[model][op];

endmodule
