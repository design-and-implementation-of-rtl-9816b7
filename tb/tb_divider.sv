// tb_divider: checks the restoring divider against integer division.
//
// Random, exact-division and corner operands with num < den; for each, quo must equal
// floor(num * 16 / den), rem_nz must tell an inexact division, and done must come
// QB + 1 clock edges after start is seen (QB iterations plus the load).
module tb_divider;
  localparam int unsigned W  = 16;
  localparam int unsigned QB = 4;

  logic clk = 1'b0;
  logic clr, start;
  logic [W-1:0]  num, den;
  logic [QB-1:0] quo;
  logic rem_nz, busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  divider #(.W(W), .QB(QB)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] n, input logic [W-1:0] d);
    int lat;
    longint unsigned eq;
    logic enz;
    @(negedge clk);
    num = n; den = d; start = 1'b1;
    @(negedge clk);
    start = 1'b0; lat = 1;
    while (!done && lat < 50) begin
      @(negedge clk);
      lat++;
    end
    eq  = (longint'(n) << QB) / longint'(d);
    enz = ((longint'(n) << QB) % longint'(d)) != 0;
    checks += 3;
    if (quo !== QB'(eq)) begin
      failures++;
      $display("FAIL %0d/%0d: quo=%0d expected %0d", n, d, quo, eq);
    end
    if (rem_nz !== enz) begin
      failures++;
      $display("FAIL %0d/%0d: rem_nz=%0b expected %0b", n, d, rem_nz, enz);
    end
    if (lat != QB + 1) begin
      failures++;
      $display("FAIL %0d/%0d: latency %0d expected %0d", n, d, lat, QB + 1);
    end
  endtask

  initial begin
    clr = 1'b1; start = 1'b0; num = '0; den = 16'd1;
    repeat (2) @(negedge clk);
    clr = 1'b0;
    run(0, 1);
    run(5, 6);
    run(9, 10);
    run(144, 145);
    run(1, 3);
    run(16'hFFFE, 16'hFFFF);
    run(1, 16'hFFFF);
    run(5, 10);
    run(1, 2);
    // exact divisions, where the partial remainder meets the divisor exactly
    for (int i = 0; i < 100; i++) begin
      int m;
      m = $urandom_range(1, 4095);
      run(W'(m * $urandom_range(0, 15)), W'(16 * m));
    end
    for (int i = 0; i < 400; i++) begin
      logic [W-1:0] d, n;
      d = W'($urandom_range(1, 65535));
      n = W'($urandom_range(0, int'(d) - 1));
      run(n, d);
    end
    // a clear during a division abandons it
    @(negedge clk);
    num = 16'd7; den = 16'd9; start = 1'b1;
    @(negedge clk);
    start = 1'b0; clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    checks++;
    if (busy || done || quo != '0) begin
      failures++;
      $display("FAIL clear did not stop the divider");
    end
    repeat (QB + 2) @(negedge clk);
    checks++;
    if (done) begin
      failures++;
      $display("FAIL done after clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
