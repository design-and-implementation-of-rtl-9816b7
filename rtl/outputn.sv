// outputn: the output-layer neuron, reducing the four hidden outputs to one bit NOUT.
//
// A neuron with 9-bit unsigned inputs IN, INN, INNN, INNNN (hidden-neuron outputs with
// 8 fraction bits), 9-bit signed weights W..WWWW and bias B, whose bias is aligned to the
// 8 fraction bits of the products. `value` is its transfer-function output (0x100 = 1.0)
// and NOUT is the binary decision value >= 0.5, which is the same as a net input >= 0;
// with 8 output fraction bits that is bit 7 of `value`. How NOUT is formed is this
// design's choice: the source design only shows a one-bit output with 0/1 results.
//
// Timing: as the neuron; `ce` starts one operation (a pulse is enough), and `valid`
// pulses in the cycle after value/nout change.
module outputn #(
  parameter int unsigned N_IN = 4,
  parameter int unsigned FB   = 4
) (
  input  logic    clk,
  input  logic    clr,
  input  logic    ce,
  input  nn_pkg::nout_t   in_h [N_IN],
  input  nn_pkg::weight_t w    [N_IN],
  input  nn_pkg::weight_t b,
  output nn_pkg::nout_t   value,
  output logic    nout,
  output logic    valid,
  output logic    busy
);

  neuron #(
    .N_IN(N_IN), .IN_W(nn_pkg::OUT_W), .W_W(nn_pkg::W_W), .XF(nn_pkg::OUT_FRAC),
    .FB(FB), .OUT_W(nn_pkg::OUT_W), .OUT_FRAC(nn_pkg::OUT_FRAC)
  ) u_neuron (
    .clk, .clr, .ce,
    .p       (in_h),
    .w, .b,
    .y       (value),
    .y_valid (valid),
    .busy
  );

  // threshold at one half
  assign nout = (value >= nn_pkg::nout_t'(1 << (nn_pkg::OUT_FRAC - 1)));

endmodule
