// tb_activation_block: checks x = sum p_j * w_j + (b << XF).
//
// Two instances: one-bit inputs (hidden layer) and 9-bit inputs with 8 fraction bits
// (output layer). Random inputs and weights are loaded, the sum is taken, and x is
// compared with the sum computed here; x must hold while sum_en is low even if the
// inputs change, and clr must zero it.
module tb_activation_block;
  import nn_ref_pkg::*;

  logic clk = 1'b0;
  logic clr, load, sum_en;
  logic [0:0] p1 [4];
  logic [8:0] p9 [4];
  logic signed [8:0] w [4];
  logic signed [8:0] b;
  logic signed [13:0] x1;
  logic signed [21:0] x9;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  activation_block dut1 (.clk, .clr, .load, .sum_en, .p(p1), .w, .b, .x(x1));
  activation_block #(.N_IN(4), .IN_W(9), .W_W(9), .XF(8)) dut9 (
    .clk, .clr, .load, .sum_en, .p(p9), .w, .b, .x(x9)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint e1, input longint e9, input string what);
    checks += 2;
    if (longint'(x1) != e1) begin
      failures++;
      $display("FAIL %s: x1=%0d expected %0d", what, x1, e1);
    end
    if (longint'(x9) != e9) begin
      failures++;
      $display("FAIL %s: x9=%0d expected %0d", what, x9, e9);
    end
  endtask

  initial begin
    longint e1, e9;
    clr = 1'b1; load = 1'b0; sum_en = 1'b0; b = '0;
    for (int j = 0; j < 4; j++) begin
      p1[j] = '0; p9[j] = '0; w[j] = '0;
    end
    @(negedge clk);
    clr = 1'b0;
    for (int i = 0; i < 300; i++) begin
      for (int j = 0; j < 4; j++) begin
        p1[j] = 1'($urandom);
        p9[j] = (i < 20) ? 9'h1FF : 9'($urandom);
        w[j]  = (i < 10) ? -9'sd256 : (i < 20 ? 9'sd255 : 9'($urandom));
      end
      b = (i < 10) ? -9'sd256 : (i < 20 ? 9'sd255 : 9'($urandom));
      e1 = s9(b);
      e9 = s9(b) * 256;
      for (int j = 0; j < 4; j++) begin
        e1 += longint'(p1[j]) * s9(w[j]);
        e9 += longint'(p9[j]) * s9(w[j]);
      end
      load = 1'b1;
      @(negedge clk);
      load = 1'b0; sum_en = 1'b1;
      @(negedge clk);
      sum_en = 1'b0;
      check(e1, e9, "sum");
      // changing the ports does not disturb the stored sum
      for (int j = 0; j < 4; j++) begin
        p1[j] = ~p1[j]; p9[j] = ~p9[j];
      end
      @(negedge clk);
      check(e1, e9, "hold");
    end
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    check(0, 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
