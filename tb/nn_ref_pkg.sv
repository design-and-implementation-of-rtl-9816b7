// nn_ref_pkg: exact reference arithmetic for the neural-network testbenches.
//
// f2_ref gives floor(2^fb * F2(x)) for a net input x with xf fraction bits, where
// F2(x) = (x / (1 + |x|) + 1) / 2. It uses the single closed form
//     floor(2^fb * (x + d) / (2 * d)),  d = 2^xf + |x|,
// which is independent of the hardware's split into quotient, rounding, add and halve.
package nn_ref_pkg;

  function automatic longint f2_ref(longint x, int xf, int fb);
    longint d;
    d = (longint'(1) << xf) + (x < 0 ? -x : x);
    return ((longint'(1) << fb) * (x + d)) / (2 * d);
  endfunction

  // neuron output bus value (8 fraction bits) for a net input
  function automatic longint neuron_ref(longint x, int xf, int fb);
    return f2_ref(x, xf, fb) << (8 - fb);
  endfunction

  // sign-extend a 9-bit weight
  function automatic longint s9(logic [8:0] v);
    return longint'($signed(v));
  endfunction

endpackage
