// tb_weights_block: checks that the weight and bias registers load, hold and clear.
//
// Random weights are offered on the inputs; they must appear one edge after `load`,
// stay unchanged while load is low even when the inputs change, and read zero after clr.
module tb_weights_block;
  localparam int unsigned N_IN = 4;
  localparam int unsigned W_W  = 9;

  logic clk = 1'b0;
  logic clr, load;
  logic signed [W_W-1:0] w_in [N_IN];
  logic signed [W_W-1:0] b_in;
  logic signed [W_W-1:0] w [N_IN];
  logic signed [W_W-1:0] b;
  logic signed [W_W-1:0] ew [N_IN];
  logic signed [W_W-1:0] eb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  weights_block #(.N_IN(N_IN), .W_W(W_W)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    checks++;
    if (b !== eb) begin
      failures++;
      $display("FAIL %s: b=%h expected %h", what, b, eb);
    end
    for (int j = 0; j < int'(N_IN); j++) begin
      checks++;
      if (w[j] !== ew[j]) begin
        failures++;
        $display("FAIL %s: w[%0d]=%h expected %h", what, j, w[j], ew[j]);
      end
    end
  endtask

  task automatic randomize_inputs();
    for (int j = 0; j < int'(N_IN); j++) w_in[j] = W_W'($urandom);
    b_in = W_W'($urandom);
  endtask

  initial begin
    clr = 1'b1; load = 1'b0;
    randomize_inputs();
    @(negedge clk);
    clr = 1'b0;
    for (int j = 0; j < int'(N_IN); j++) ew[j] = '0;
    eb = '0;
    compare("after clear");
    for (int i = 0; i < 200; i++) begin
      randomize_inputs();
      load = ($urandom_range(0, 1) == 1);
      if (load) begin
        ew = w_in;
        eb = b_in;
      end
      @(negedge clk);
      compare(load ? "load" : "hold");
    end
    randomize_inputs();
    load = 1'b1; clr = 1'b1;
    @(negedge clk);
    clr = 1'b0; load = 1'b0;
    for (int j = 0; j < int'(N_IN); j++) ew[j] = '0;
    eb = '0;
    compare("clear wins over load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
