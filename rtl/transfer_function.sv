// transfer_function: the neuron's sigmoid-like limiting function, without a lookup table,
//
//     F2(x) = 1/2 * ( x / (1 + |x|) + 1 ),
//
// which rises from 0 to 1 like the logistic sigmoid and needs no exponential. It is built,
// as in the source design, from an absolute-value circuit, an adder forming 1 + |x|, a
// divider, an adder adding 1 and a divide-by-two.
//
// x is signed with XF fraction bits, so the divisor is 2^XF + |x| and the divider forms
// |x| / (2^XF + |x|) to FB fraction bits. A negative quotient is rounded down (one more
// unit when the division is inexact), 1.0 = 2^FB is added and the sum is halved by a
// shift, again rounding down: the result is exactly floor(2^FB * F2(x)), 0 .. 2^FB - 1.
// It leaves on an OUT_W-bit bus with OUT_FRAC fraction bits (0x100 = 1.0 by default).
// The rounding and FB = 4 are this design's reading of the published waveforms.
//
// Timing: `start` samples x; FB cycles later `done` pulses for one cycle and f is valid
// from then until the next start (FB + 1 rising edges from start to done).
module transfer_function #(
  parameter int unsigned X_W      = 14,  // width of x
  parameter int unsigned XF       = 0,   // fraction bits of x
  parameter int unsigned FB       = 4,   // fraction bits of the quotient
  parameter int unsigned OUT_W    = 9,
  parameter int unsigned OUT_FRAC = 8    // fraction bits of f, at least FB
) (
  input  logic                  clk,
  input  logic                  clr,
  input  logic                  start,
  input  logic signed [X_W-1:0] x,
  output logic [OUT_W-1:0]      f,
  output logic                  done
);

  localparam int unsigned DW = X_W + 1;

  logic [X_W-1:0] mag;      // absolute value circuit
  logic [DW-1:0]  den;      // first adder: 1 + |x|
  logic [FB-1:0]  quo;
  logic           rem_nz;
  logic           busy;
  logic           neg_q;    // sign of x, kept for the division
  logic [FB:0]    q_mag;    // |quotient| after rounding down a negative one
  logic [FB:0]    s;        // second adder: quotient + 1
  logic [FB-1:0]  half;     // divide by two

  assign mag = x[X_W-1] ? X_W'(-x) : X_W'(x);
  assign den = (DW'(1) << XF) + DW'(mag);

  always_ff @(posedge clk) begin
    if (clr)                neg_q <= 1'b0;
    else if (start && !busy) neg_q <= x[X_W-1];
  end

  divider #(.W(DW), .QB(FB)) u_div (
    .clk    (clk),
    .clr    (clr),
    .start  (start),
    .num    (DW'(mag)),
    .den    (den),
    .quo    (quo),
    .rem_nz (rem_nz),
    .busy   (busy),
    .done   (done)
  );

  always_comb begin
    if (neg_q) begin
      q_mag = (FB+1)'(quo) + (FB+1)'(rem_nz);
      s     = (FB+1)'(1 << FB) - (FB+1)'(q_mag);
    end else begin
      q_mag = (FB+1)'(quo);
      s     = (FB+1)'(1 << FB) + (FB+1)'(q_mag);
    end
    half = FB'(s >> 1);
  end

  assign f = OUT_W'(half) << (OUT_FRAC - FB);

endmodule
