// tb_neuron_state: checks the neuron output register and its valid pulse.
//
// A random write stream: y must take d one edge after we, hold otherwise, and y_valid
// must follow we by one cycle; clr zeroes both.
module tb_neuron_state;
  logic clk = 1'b0;
  logic clr, we, y_valid;
  logic [8:0] d, y, ey;
  logic ev;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  neuron_state #(.OUT_W(9)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b1; we = 1'b0; d = '0;
    @(negedge clk);
    clr = 1'b0;
    ey = '0; ev = 1'b0;
    for (int i = 0; i < 300; i++) begin
      d  = 9'($urandom);
      we = ($urandom_range(0, 2) == 0);
      clr = (i == 150);
      if (clr) begin
        ey = '0; ev = 1'b0;
      end else begin
        if (we) ey = d;
        ev = we;
      end
      @(negedge clk);
      checks += 2;
      if (y !== ey) begin
        failures++;
        $display("FAIL step %0d: y=%h expected %h", i, y, ey);
      end
      if (y_valid !== ev) begin
        failures++;
        $display("FAIL step %0d: y_valid=%0b expected %0b", i, y_valid, ev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
