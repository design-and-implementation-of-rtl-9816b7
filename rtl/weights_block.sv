// weights_block: the weight and bias registers of one neuron.
//
// Holds N_IN signed weights and one bias. When the control unit raises `load` the
// registers copy w_in/b_in on the next rising clock edge; otherwise they hold, so the
// weight ports may change while a computation is under way. `clr` (synchronous, wins
// over load) sets every register to zero. Registers rather than a ROM follow the source
// design's choice for a small number of weights; the clear value is this design's own.
module weights_block #(
  parameter int unsigned N_IN = 4,
  parameter int unsigned W_W  = 9
) (
  input  logic                       clk,
  input  logic                       clr,
  input  logic                       load,
  input  logic signed [W_W-1:0]      w_in [N_IN],
  input  logic signed [W_W-1:0]      b_in,
  output logic signed [W_W-1:0]      w    [N_IN],
  output logic signed [W_W-1:0]      b
);

  always_ff @(posedge clk) begin
    if (clr) begin
      for (int j = 0; j < int'(N_IN); j++) w[j] <= '0;
      b <= '0;
    end else if (load) begin
      for (int j = 0; j < int'(N_IN); j++) w[j] <= w_in[j];
      b <= b_in;
    end
  end

endmodule
