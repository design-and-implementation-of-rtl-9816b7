// neuron_state: the Neuron State Block, the register that holds a neuron's output.
//
// On a rising edge with `we` high it stores the transfer-function result `d`; y_valid is
// high for the one cycle after each write. `clr` (synchronous) sets y to zero and drops
// y_valid. The valid pulse is this design's own addition, used to chain layers.
module neuron_state #(
  parameter int unsigned OUT_W = 9
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             we,
  input  logic [OUT_W-1:0] d,
  output logic [OUT_W-1:0] y,
  output logic             y_valid
);

  always_ff @(posedge clk) begin
    if (clr) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= we;
      if (we) y <= d;
    end
  end

endmodule
