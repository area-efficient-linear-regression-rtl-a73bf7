// lr_control: sequence control of the linear-regression core.
//
// Two state machines. The first counts the pairs of a sequence: start_i
// (with the first pair) restarts the count, whatever is in progress, and
// latches the model; the k-th pair gets the indexes 2k and 2k+1 and the
// accumulators are told to restart on the pair that carries start_i. After
// N/2 pairs (128 for the 256 model, 64 for the 128 model) the count stops
// until the next start_i; pairs between sequences are ignored. The end of a
// sequence travels down a four-stage delay line, matched to the accumulator
// latency, and then pulses ld_o, which loads the finished sums into the
// holding registers. The second state machine then issues the four products
// of the coefficient stage on four consecutive cycles, addressing the ROM
// with the op and the model of that sequence. A new sequence may start the
// cycle after the last pair of the previous one: the first stage then
// accumulates while the second computes the previous coefficients, so the
// shortest legal sequence is four cycles (eight samples).
//
// Timing, for a last pair in cycle T: ld_o in T+4, ops in T+5..T+8.
// What the control does (restart, count, load, start the coefficient FSM)
// follows the published description; the abandon-on-restart rule, the
// absence of a valid input and the op order are this design's choices.
module lr_control
  import linreg_pkg::*;
#(
  parameter int unsigned N_LONG  = 256,
  parameter int unsigned N_SHORT = 128,
  localparam int unsigned IDX_W  = $clog2(N_LONG),
  localparam int unsigned CNT_W  = IDX_W - 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start_i,
  input  model_e           model_i,
  // to the accumulators (aligned with the input pair)
  output logic             acc_valid_o,
  output logic             acc_first_o,
  output logic [IDX_W-1:0] idx0_o,
  output logic [IDX_W-1:0] idx1_o,
  // load of the finished sums
  output logic             ld_o,
  // coefficient stage
  output logic             op_valid_o,
  output coef_op_e         op_o,
  output model_e           op_model_o
);

  typedef enum logic [2:0] {S_IDLE, S_A_SID, S_A_SD, S_B_SD, S_B_SID} coef_state_e;

  typedef struct packed {
    logic   last;
    model_e model;
  } end_tag_t;

  logic             active;
  logic [CNT_W-1:0] cnt, k, len_m1;
  model_e           seq_model, cur_model;
  logic             run, last;
  end_tag_t [3:0]   end_d;
  coef_state_e      state;

  // ---- sample counter ----
  always_comb begin
    run       = start_i | active;
    k         = start_i ? '0 : cnt;
    cur_model = start_i ? model_i : seq_model;
    len_m1    = (cur_model == MODEL_SHORT) ? CNT_W'(N_SHORT / 2 - 1) : CNT_W'(N_LONG / 2 - 1);
    last      = run && (k == len_m1);
  end

  assign acc_valid_o = run;
  assign acc_first_o = start_i;
  assign idx0_o      = {k, 1'b0};
  assign idx1_o      = {k, 1'b1};

  always_ff @(posedge clk) begin
    if (rst) begin
      active    <= 1'b0;
      cnt       <= '0;
      seq_model <= MODEL_LONG;
      end_d     <= '0;
    end else begin
      if (start_i) seq_model <= model_i;
      if (run) begin
        cnt    <= k + 1'b1;
        active <= !last;
      end
      end_d <= {end_d[2:0], end_tag_t'{last: last, model: cur_model}};
    end
  end

  assign ld_o = end_d[3].last;

  // ---- coefficient state machine ----
  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      op_model_o <= MODEL_LONG;
    end else begin
      if (ld_o) op_model_o <= end_d[3].model;
      unique case (state)
        S_IDLE:  state <= ld_o ? S_A_SID : S_IDLE;
        S_A_SID: state <= S_A_SD;
        S_A_SD:  state <= S_B_SD;
        S_B_SD:  state <= S_B_SID;
        S_B_SID: state <= ld_o ? S_A_SID : S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    op_valid_o = (state != S_IDLE);
    unique case (state)
      S_A_SD:  op_o = OP_A_SD;
      S_B_SD:  op_o = OP_B_SD;
      S_B_SID: op_o = OP_B_SID;
      default: op_o = OP_A_SID;
    endcase
  end

  // a new load may only arrive once the previous coefficients are issued
  assert property (@(posedge clk) disable iff (rst)
                   ld_o |-> (state == S_IDLE || state == S_B_SID))
    else $error("lr_control: sequence shorter than the coefficient stage");

  initial begin
    assert (N_SHORT / 2 >= 4 && N_LONG >= N_SHORT && N_SHORT % 2 == 0 && N_LONG % 2 == 0)
      else $fatal(1, "lr_control: sequence lengths must be even and at least 8");
  end

endmodule
