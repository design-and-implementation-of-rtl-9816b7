// nn_top: a fully parallel 4-4-1 feed-forward neural network with trained, loadable weights.
//
// Four hidden neurons work at the same time on the four one-bit inputs INP1..INP4 (inp[0]
// is INP1 and reaches input I1 of every hidden neuron). Their 9-bit outputs feed the four
// inputs of the output neuron, hidden neuron n to input n, and the output neuron's one-bit
// decision is the network output OUTN. Every neuron evaluates the sigmoid approximation
// F2(x) = (x / (1 + |x|) + 1) / 2 with its own divider, so no lookup table is used. The
// weights and biases enter on ports (hidden neuron n: hid_w[n][0..3] = W1..W4,
// hid_b[n] = B; output neuron: out_w, out_b) and are held in each neuron's weight
// registers; nn_pkg holds the published trained values.
//
// Timing: while ce is high the hidden layer samples inp and the weights every 4 + FB = 8
// cycles; each hidden result pulse starts the output neuron, which samples the hidden
// outputs one cycle later. outn/out_value change 2 * (3 + FB) + 2 = 16 rising edges after
// the edge that sampled inp, and out_valid pulses in the cycle after; with ce held high a
// new result follows every 8 cycles (the output neuron finishes in the very cycle the
// next hidden result pulse arrives, and takes it). busy is high while any neuron is
// working. clr is synchronous and clears every register. Starting the output neuron from
// the hidden layer's result pulse, rather than from the shared CE, is this design's
// choice; it keeps each result tied to one input pattern.
module nn_top
  import nn_pkg::*;
(
  input  logic    clk,
  input  logic    clr,
  input  logic    ce,
  input  logic    inp     [N_IN],
  input  weight_t hid_w   [N_HID][N_IN],
  input  weight_t hid_b   [N_HID],
  input  weight_t out_w   [N_HID],
  input  weight_t out_b,
  output nout_t   hid_out [N_HID],
  output nout_t   out_value,
  output logic    outn,
  output logic    out_valid,
  output logic    busy
);

  logic [0:0] p_hid   [N_IN];
  logic       hid_valid [N_HID];
  logic       hid_busy  [N_HID];
  logic       out_busy;

  always_comb for (int j = 0; j < int'(N_IN); j++) p_hid[j] = inp[j];

  for (genvar n = 0; n < int'(N_HID); n++) begin : g_hidden
    neuron #(
      .N_IN(N_IN), .IN_W(1), .W_W(W_W), .XF(0),
      .FB(FB), .OUT_W(OUT_W), .OUT_FRAC(OUT_FRAC)
    ) u_neuronh (
      .clk, .clr, .ce,
      .p       (p_hid),
      .w       (hid_w[n]),
      .b       (hid_b[n]),
      .y       (hid_out[n]),
      .y_valid (hid_valid[n]),
      .busy    (hid_busy[n])
    );
  end

  outputn #(.N_IN(N_HID), .FB(FB)) u_outputn (
    .clk, .clr,
    .ce    (hid_valid[0]),
    .in_h  (hid_out),
    .w     (out_w),
    .b     (out_b),
    .value (out_value),
    .nout  (outn),
    .valid (out_valid),
    .busy  (out_busy)
  );

  // some neuron is in the middle of an operation
  always_comb begin
    busy = out_busy;
    for (int n = 0; n < int'(N_HID); n++) busy |= hid_busy[n];
  end

  // the hidden neurons share their control inputs, so they run in lockstep
  for (genvar n = 1; n < int'(N_HID); n++) begin : g_lockstep
    a_lockstep: assert property (@(posedge clk) hid_valid[n] == hid_valid[0]);
  end

endmodule
