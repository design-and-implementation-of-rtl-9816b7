// tb_outputn: checks the output neuron: 9-bit fixed-point inputs, value and NOUT.
//
// Inputs are hidden-neuron outputs (multiples of 0x010 up to 0x0F0), weights and bias
// random or small. value must equal floor(16 * F2(X)) << 4 with X = sum in_j * w_j +
// (b << 8) carrying 8 fraction bits, NOUT must be value >= 0x080, and the result must
// come 9 falling edges after a one-cycle CE pulse. The published trained output weights
// are among the cases.
module tb_outputn;
  import nn_ref_pkg::*;

  localparam int FB = 4;

  logic clk = 1'b0;
  logic clr, ce;
  logic [8:0] in_h [4];
  logic signed [8:0] w [4];
  logic signed [8:0] b;
  logic [8:0] value;
  logic nout, valid, busy;
  int checks = 0, failures = 0;
  int n_one = 0, n_zero = 0;

  always #5 clk = ~clk;

  outputn dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint x, e;
    int lat;
    clr = 1'b1; ce = 1'b0; b = '0;
    for (int j = 0; j < 4; j++) begin
      in_h[j] = '0; w[j] = '0;
    end
    repeat (2) @(negedge clk);
    clr = 1'b0;
    for (int i = 0; i < 400; i++) begin
      for (int j = 0; j < 4; j++) begin
        in_h[j] = 9'($urandom_range(0, 15) << 4);
        w[j]    = (i % 2 == 0) ? 9'($urandom) : 9'($signed(3'($urandom)));
      end
      b = (i % 2 == 0) ? 9'($urandom) : 9'($signed(3'($urandom)));
      if (i < 4) begin
        for (int j = 0; j < 4; j++) w[j] = nn_pkg::OUT_W_TRAINED[j];
        b = nn_pkg::OUT_B_TRAINED;
      end
      x = s9(b) * 256;
      for (int j = 0; j < 4; j++) x += longint'(in_h[j]) * s9(w[j]);
      e = neuron_ref(x, 8, FB);
      ce = 1'b1;
      @(negedge clk);
      ce = 1'b0; lat = 1;
      while (!valid && lat < 100) begin
        @(negedge clk);
        lat++;
      end
      checks += 3;
      if (longint'(value) != e) begin
        failures++;
        $display("FAIL %0d: value=%h expected %h (x=%0d)", i, value, e, x);
      end
      if (nout !== (e >= 'h080)) begin
        failures++;
        $display("FAIL %0d: nout=%0b for value %h", i, nout, e);
      end
      if (lat != 2 + 3 + FB) begin
        failures++;
        $display("FAIL %0d: latency %0d", i, lat);
      end
      if (nout) n_one++;
      else      n_zero++;
    end
    checks++;
    if (n_one == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL NOUT never took both values");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
