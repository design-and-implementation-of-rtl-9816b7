// neuron: one processing element, y = F2( sum_j p_j * w_j + b ).
//
// Five blocks, as in the source design's neuron: the weights block (weight and bias
// registers), the activation block (multipliers and adders), the transfer function block
// (F2 computed with an absolute value, two adders, a divider and a halving), the neuron
// state block (output register) and the control unit that sequences them from CLK, CLR
// and CE. With its default parameters this is the hidden-layer neuron: four one-bit
// inputs I1..I4, four 9-bit weights W, WW, WWW, WWWW (w[0] = W goes with p[0] = I1),
// a 9-bit bias B and a 9-bit OUTPUT with 8 fraction bits. Setting IN_W and XF makes the
// same neuron take multi-bit fixed-point inputs, as the output layer does.
//
// Timing: p, w and b are sampled in the LOAD cycle, one clock after ce is seen in IDLE;
// y changes 3 + FB rising edges after that sampling edge and y_valid pulses in the cycle
// after. With ce held high the neuron repeats every 4 + FB cycles. clr is synchronous.
// The sequencing, widths and rounding are this design's choices.
module neuron #(
  parameter int unsigned N_IN     = 4,
  parameter int unsigned IN_W     = 1,
  parameter int unsigned W_W      = 9,
  parameter int unsigned XF       = 0,
  parameter int unsigned FB       = 4,
  parameter int unsigned OUT_W    = 9,
  parameter int unsigned OUT_FRAC = 8
) (
  input  logic                  clk,
  input  logic                  clr,
  input  logic                  ce,
  input  logic [IN_W-1:0]       p [N_IN],
  input  logic signed [W_W-1:0] w [N_IN],
  input  logic signed [W_W-1:0] b,
  output logic [OUT_W-1:0]      y,
  output logic                  y_valid,
  output logic                  busy
);

  localparam int unsigned SUM_W = W_W + IN_W + 1 + $clog2(N_IN + 1);

  logic                    load, sum_en, tf_start, tf_done, state_we;
  logic signed [W_W-1:0]   w_q [N_IN];
  logic signed [W_W-1:0]   b_q;
  logic signed [SUM_W-1:0] x;
  logic [OUT_W-1:0]        f;

  control_unit u_ctrl (
    .clk, .clr, .ce, .tf_done,
    .load, .sum_en, .tf_start, .state_we, .busy
  );

  weights_block #(.N_IN(N_IN), .W_W(W_W)) u_weights (
    .clk, .clr, .load,
    .w_in (w),
    .b_in (b),
    .w    (w_q),
    .b    (b_q)
  );

  activation_block #(.N_IN(N_IN), .IN_W(IN_W), .W_W(W_W), .XF(XF), .SUM_W(SUM_W)) u_act (
    .clk, .clr, .load, .sum_en,
    .p,
    .w (w_q),
    .b (b_q),
    .x
  );

  transfer_function #(.X_W(SUM_W), .XF(XF), .FB(FB), .OUT_W(OUT_W), .OUT_FRAC(OUT_FRAC)) u_tf (
    .clk, .clr,
    .start (tf_start),
    .x,
    .f,
    .done  (tf_done)
  );

  neuron_state #(.OUT_W(OUT_W)) u_state (
    .clk, .clr,
    .we (state_we),
    .d  (f),
    .y,
    .y_valid
  );

endmodule
