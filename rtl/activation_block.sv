// activation_block: the multiply-and-sum stage of a neuron, x = sum_j p_j * w_j + b.
//
// One multiplier per input and an adder chain, as in the direct digital neuron of the
// source design. Inputs p_j are unsigned IN_W-bit values (one bit in the hidden layer,
// where the multiplier reduces to a select; a hidden-neuron output with XF fraction bits
// in the output layer). Weights and bias are signed integers; the bias is shifted left by
// XF so that it has the scale of the products, and x carries XF fraction bits.
//
// Timing: with `load` high the inputs are copied into the input register on the rising
// edge (the weights block loads in the same cycle); with `sum_en` high the sum of the
// registered operands is stored in x on the next edge. `clr` zeroes both registers.
// Input and sum registers, the bias alignment and the widths are this design's choices.
module activation_block #(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned IN_W  = 1,
  parameter int unsigned W_W   = 9,
  parameter int unsigned XF    = 0,
  // wide enough for N_IN products and the bias without overflow (needs XF <= IN_W + 1)
  parameter int unsigned SUM_W = W_W + IN_W + 1 + $clog2(N_IN + 1)
) (
  input  logic                    clk,
  input  logic                    clr,
  input  logic                    load,
  input  logic                    sum_en,
  input  logic [IN_W-1:0]         p [N_IN],
  input  logic signed [W_W-1:0]   w [N_IN],
  input  logic signed [W_W-1:0]   b,
  output logic signed [SUM_W-1:0] x
);

  logic [IN_W-1:0]         p_q [N_IN];
  logic signed [SUM_W-1:0] prod [N_IN];
  logic signed [SUM_W-1:0] sum;

  always_ff @(posedge clk) begin
    if (clr) begin
      for (int j = 0; j < int'(N_IN); j++) p_q[j] <= '0;
    end else if (load) begin
      for (int j = 0; j < int'(N_IN); j++) p_q[j] <= p[j];
    end
  end

  // multipliers: unsigned input (zero-extended) times signed weight
  always_comb begin
    for (int j = 0; j < int'(N_IN); j++) begin
      prod[j] = SUM_W'($signed({1'b0, p_q[j]}) * w[j]);
    end
  end

  // adders: bias aligned to the products, then every product
  always_comb begin
    sum = SUM_W'(b) <<< XF;
    for (int j = 0; j < int'(N_IN); j++) sum = sum + prod[j];
  end

  always_ff @(posedge clk) begin
    if (clr)         x <= '0;
    else if (sum_en) x <= sum;
  end

endmodule
