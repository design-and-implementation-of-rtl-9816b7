// nn_pkg: shared sizes, types and trained constants of the 4-4-1 neural network.
//
// The network has four one-bit inputs, four hidden neurons and one output neuron (the
// layer sizes and the 9-bit weight buses come from the source design). Weights and biases
// are 9-bit two's complement integers. A neuron output is a 9-bit unsigned value with
// 8 fraction bits (0x100 would be 1.0); the transfer function resolves FB = 4 fraction
// bits, so outputs are multiples of 0x010 in the range 0x000..0x0F0. The number format
// is this design's reading of the published single-neuron waveforms, not a stated rule.
//
// HID_W_TRAINED / OUT_W_TRAINED hold the trained weights and biases as published
// (hidden neuron n, weights W1..W4 then bias).
package nn_pkg;

  localparam int unsigned N_IN     = 4;   // neurons in the input layer
  localparam int unsigned N_HID    = 4;   // neurons in the hidden layer
  localparam int unsigned W_W      = 9;   // weight / bias width
  localparam int unsigned FB       = 4;   // fraction bits resolved by the transfer function
  localparam int unsigned OUT_W    = 9;   // neuron output width
  localparam int unsigned OUT_FRAC = 8;   // fraction bits of a neuron output

  typedef logic signed [W_W-1:0] weight_t;
  typedef logic [OUT_W-1:0]      nout_t;

  // States of a neuron's control unit.
  typedef enum logic [2:0] {
    CU_IDLE = 3'd0,   // waiting for CE
    CU_LOAD = 3'd1,   // weights and inputs captured
    CU_SUM  = 3'd2,   // sum of products captured
    CU_DIV  = 3'd3,   // transfer function started
    CU_WAIT = 3'd4    // waiting for the transfer function, then state written
  } cu_state_t;

  // Trained weights (hex as published, 9-bit two's complement).
  localparam weight_t HID_W_TRAINED [N_HID][N_IN] = '{
    '{9'h17E, 9'h1DE, 9'h1DE, 9'h028},
    '{9'h058, 9'h020, 9'h020, 9'h1DD},
    '{9'h17C, 9'h1E9, 9'h1EA, 9'h060},
    '{9'h1BF, 9'h198, 9'h1A0, 9'h034}
  };
  localparam weight_t HID_B_TRAINED [N_HID] = '{9'h025, 9'h1F0, 9'h031, 9'h1BF};
  localparam weight_t OUT_W_TRAINED [N_HID] = '{9'h011, 9'h040, 9'h1EE, 9'h020};
  localparam weight_t OUT_B_TRAINED         = 9'h060;

endpackage
