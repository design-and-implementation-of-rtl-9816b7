// control_unit: sequences one neuron through load, sum, transfer function and state write.
//
// IDLE waits for `ce`. LOAD raises `load` (weights block and input register capture),
// SUM raises `sum_en` (the sum of products is registered), DIV raises `tf_start` (the
// transfer function samples the sum) and WAIT holds until `tf_done`, when it raises
// `state_we` so the neuron state block takes the result. From WAIT it goes straight back
// to LOAD while ce is high, so a neuron with ce held high recomputes every 4 + FB cycles
// and follows changing inputs and weights; with ce low it finishes the operation under
// way and stops in IDLE. `clr` is synchronous and returns to IDLE.
// The source design has a control unit driven by clock, clear and enable; the states are
// this design's own.
module control_unit
  import nn_pkg::*;
(
  input  logic clk,
  input  logic clr,
  input  logic ce,
  input  logic tf_done,
  output logic load,
  output logic sum_en,
  output logic tf_start,
  output logic state_we,
  output logic busy
);

  cu_state_t state, state_n;

  always_ff @(posedge clk) begin
    if (clr) state <= CU_IDLE;
    else     state <= state_n;
  end

  always_comb begin
    state_n  = state;
    load     = 1'b0;
    sum_en   = 1'b0;
    tf_start = 1'b0;
    state_we = 1'b0;
    unique case (state)
      CU_IDLE: if (ce) state_n = CU_LOAD;
      CU_LOAD: begin
        load    = 1'b1;
        state_n = CU_SUM;
      end
      CU_SUM: begin
        sum_en  = 1'b1;
        state_n = CU_DIV;
      end
      CU_DIV: begin
        tf_start = 1'b1;
        state_n  = CU_WAIT;
      end
      CU_WAIT: if (tf_done) begin
        state_we = 1'b1;
        state_n  = ce ? CU_LOAD : CU_IDLE;
      end
      default: state_n = CU_IDLE;
    endcase
  end

  assign busy = (state != CU_IDLE);

  // the transfer function may only report a result while one is awaited
  a_done_in_wait: assert property (@(posedge clk) disable iff (clr) tf_done |-> state == CU_WAIT);

endmodule
