// divider: sequential restoring divider giving the fraction num / den to QB bits.
//
// For 0 <= num < den the quotient is below one, so only its QB fraction bits are formed:
// quo = floor(num * 2^QB / den), one bit per clock, most significant first (shift the
// partial remainder left, subtract den when it fits). rem_nz tells whether the division
// was inexact, which the transfer function needs to round a negative quotient down.
//
// Timing: `start` (ignored while busy) loads num/den on a rising edge; busy is then high
// for QB cycles and `done` pulses high for one cycle with quo/rem_nz valid. The results
// hold until the next start. `clr` is synchronous and abandons a division. The source
// design names a divider without giving its structure; this one is this design's choice.
module divider #(
  parameter int unsigned W  = 16,   // width of num and den
  parameter int unsigned QB = 4     // quotient bits
) (
  input  logic          clk,
  input  logic          clr,
  input  logic          start,
  input  logic [W-1:0]  num,
  input  logic [W-1:0]  den,
  output logic [QB-1:0] quo,
  output logic          rem_nz,
  output logic          busy,
  output logic          done
);

  localparam int unsigned CW = $clog2(QB + 1);

  logic [W:0]    rem;      // partial remainder, one bit wider than den for the shift
  logic [W-1:0]  den_q;
  logic [CW-1:0] cnt;
  logic [W:0]    rem2;

  assign rem2   = {rem[W-1:0], 1'b0};
  assign rem_nz = (rem != '0);

  always_ff @(posedge clk) begin
    if (clr) begin
      rem   <= '0;
      den_q <= '0;
      quo   <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        rem   <= {1'b0, num};
        den_q <= den;
        quo   <= '0;
        cnt   <= CW'(QB);
        busy  <= 1'b1;
      end else if (busy) begin
        if (rem2 >= {1'b0, den_q}) begin
          rem <= rem2 - {1'b0, den_q};
          quo <= {quo[QB-2:0], 1'b1};
        end else begin
          rem <= rem2;
          quo <= {quo[QB-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // the restoring step is exact only while the dividend is below the divisor
  property p_num_below_den;
    @(posedge clk) disable iff (clr) (start && !busy) |-> (num < den);
  endproperty
  a_num_below_den: assert property (p_num_below_den);

endmodule
