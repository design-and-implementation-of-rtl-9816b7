// tb_neuron: checks the hidden-layer neuron (default parameters) end to end.
//
// 1. The four published single-neuron results, each as one operation started by a CE
//    pulse: weights 020 x4 / bias 010 with all inputs 1 gives 0F0; 074,199,1EE,114 /
//    0EC gives 010; 1FE x4 / 1FF gives 000; 040,040,030,1FE / 1FF with I1 = I2 = 0 gives
//    0F0. The latency from CE to y_valid is checked (2 + 3 + FB = 9 falling edges).
// 2. Continuous operation with CE held high: new random inputs and weights are offered
//    at every y_valid, each result is compared with an exact model and results must come
//    every 4 + FB = 8 cycles.
// 3. CE low stops the neuron with its output held; CLR zeroes the output.
module tb_neuron;
  import nn_ref_pkg::*;

  localparam int FB = 4;

  logic clk = 1'b0;
  logic clr, ce;
  logic [0:0] p [4];
  logic signed [8:0] w [4];
  logic signed [8:0] b;
  logic [8:0] y;
  logic y_valid, busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  neuron dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint model();
    longint x;
    x = s9(b);
    for (int j = 0; j < 4; j++) x += longint'(p[j]) * s9(w[j]);
    return neuron_ref(x, 0, FB);
  endfunction

  task automatic set(input logic [8:0] w1, w2, w3, w4, bb, input logic [3:0] ins);
    w[0] = w1; w[1] = w2; w[2] = w3; w[3] = w4; b = bb;
    for (int j = 0; j < 4; j++) p[j] = ins[j];
  endtask

  task automatic single(input logic [8:0] expected, input string what);
    int lat;
    ce = 1'b1;
    @(negedge clk);
    ce = 1'b0; lat = 1;
    while (!y_valid && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    checks += 2;
    if (y !== expected || longint'(y) != model()) begin
      failures++;
      $display("FAIL %s: y=%h expected %h (model %h)", what, y, expected, model());
    end
    if (lat != 2 + 3 + FB) begin
      failures++;
      $display("FAIL %s: latency %0d expected %0d", what, lat, 2 + 3 + FB);
    end
  endtask

  initial begin
    longint e;
    int since;
    clr = 1'b1; ce = 1'b0;
    set(0, 0, 0, 0, 0, 4'b0000);
    repeat (2) @(negedge clk);
    clr = 1'b0;
    // published results; ins = {I4, I3, I2, I1}
    set(9'h020, 9'h020, 9'h020, 9'h020, 9'h010, 4'b1111); single(9'h0F0, "waveform 1");
    set(9'h074, 9'h199, 9'h1EE, 9'h114, 9'h0EC, 4'b1111); single(9'h010, "waveform 2");
    set(9'h1FE, 9'h1FE, 9'h1FE, 9'h1FE, 9'h1FF, 4'b1111); single(9'h000, "waveform 3");
    set(9'h040, 9'h040, 9'h030, 9'h1FE, 9'h1FF, 4'b1100); single(9'h0F0, "waveform 4");
    // continuous operation
    ce = 1'b1;
    @(negedge clk);
    while (!y_valid) @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      set(9'($urandom), 9'($urandom), 9'($urandom), 9'($urandom), 9'($urandom), 4'($urandom));
      if (i % 3 == 0) begin
        // small weights keep the net input near zero, where F2 is steep
        for (int j = 0; j < 4; j++) w[j] = 9'($signed(4'($urandom)));
        b = 9'($signed(4'($urandom)));
      end
      e = model();
      since = 0;
      @(negedge clk);
      // the operands were sampled; change the ports to show they are not read again
      set(9'($urandom), 9'($urandom), 9'($urandom), 9'($urandom), 9'($urandom), 4'($urandom));
      since = 1;
      while (!y_valid && since < 100) begin
        @(negedge clk);
        since++;
      end
      checks += 2;
      if (longint'(y) != e) begin
        failures++;
        $display("FAIL continuous %0d: y=%h expected %h", i, y, e);
      end
      if (since != 4 + FB) begin
        failures++;
        $display("FAIL continuous %0d: period %0d expected %0d", i, since, 4 + FB);
      end
    end
    // CE low: the operation under way ends, then the neuron stops and holds y
    ce = 1'b0;
    e = longint'(y);
    repeat (30) @(negedge clk);
    checks += 2;
    if (busy) begin
      failures++;
      $display("FAIL busy with CE low");
    end
    if (y_valid) begin
      failures++;
      $display("FAIL result with CE low");
    end
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    checks++;
    if (y !== '0) begin
      failures++;
      $display("FAIL y=%h after clear", y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
