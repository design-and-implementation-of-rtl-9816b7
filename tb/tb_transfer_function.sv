// tb_transfer_function: checks F2(x) = (x / (1 + |x|) + 1) / 2 to 4 fraction bits.
//
// Two instances: integer net inputs (XF = 0, as in a hidden neuron) and net inputs with
// 8 fraction bits (as in the output neuron). Every result is compared with the closed
// form floor(16 * (x + d) / (2 d)), d = 2^XF + |x|, shifted onto the 8-fraction-bit
// output bus; the four single-neuron results of the published waveform (net inputs
// 144, -5, -9 and 45 giving 0F0, 010, 000, 0F0) are checked by value; start-to-done
// must take FB + 1 clock edges.
module tb_transfer_function;
  import nn_ref_pkg::*;

  localparam int unsigned FB = 4;

  logic clk = 1'b0;
  logic clr, start;
  logic signed [13:0] x0;
  logic signed [21:0] x8;
  logic [8:0] f0, f8;
  logic done0, done8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  transfer_function dut0 (
    .clk, .clr, .start, .x(x0), .f(f0), .done(done0)
  );
  transfer_function #(.X_W(22), .XF(8), .FB(FB), .OUT_W(9), .OUT_FRAC(8)) dut8 (
    .clk, .clr, .start, .x(x8), .f(f8), .done(done8)
  );

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint a, input longint b, input int expect0);
    int lat;
    @(negedge clk);
    x0 = 14'(a); x8 = 22'(b); start = 1'b1;
    @(negedge clk);
    start = 1'b0; lat = 1;
    while (!done0 && lat < 50) begin
      @(negedge clk);
      lat++;
    end
    checks += 3;
    if (lat != FB + 1 || !done8) begin
      failures++;
      $display("FAIL x=%0d: latency %0d expected %0d", a, lat, FB + 1);
    end
    if (longint'(f0) != neuron_ref(a, 0, FB) || (expect0 >= 0 && int'(f0) != expect0)) begin
      failures++;
      $display("FAIL XF=0 x=%0d: f=%h expected %h", a, f0, neuron_ref(a, 0, FB));
    end
    if (longint'(f8) != neuron_ref(b, 8, FB)) begin
      failures++;
      $display("FAIL XF=8 x=%0d: f=%h expected %h", b, f8, neuron_ref(b, 8, FB));
    end
  endtask

  initial begin
    clr = 1'b1; start = 1'b0; x0 = '0; x8 = '0;
    repeat (2) @(negedge clk);
    clr = 1'b0;
    // published single-neuron results
    run(144, 0, 'h0F0);
    run(-5, 0, 'h010);
    run(-9, 0, 'h000);
    run(45, 0, 'h0F0);
    // every small integer input, and the extremes
    for (int a = -300; a <= 300; a++) run(a, a * 37, -1);
    run(8191, 2097151, -1);
    run(-8192, -2097152, -1);
    run(-8191, -2097151, -1);
    for (int i = 0; i < 300; i++)
      run(longint'($signed(14'($urandom))), longint'($signed(22'($urandom))), -1);
    // the value at zero is one half
    run(0, 0, 'h080);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
