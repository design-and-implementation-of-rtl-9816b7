// tb_control_unit: checks the neuron sequencer cycle by cycle.
//
// A small model of the transfer function answers tf_start with tf_done DIV_CYCLES + 1
// cycles later, as the real one does for FB = DIV_CYCLES. The strobes must come in the order load, sum_en, tf_start, then
// state_we in the cycle of tf_done, each exactly once per operation; with ce held high
// the next load follows state_we directly, with ce low the unit goes idle; clr returns
// it to idle at once.
module tb_control_unit;
  localparam int DIV_CYCLES = 4;

  logic clk = 1'b0;
  logic clr, ce, tf_done;
  logic load, sum_en, tf_start, state_we, busy;
  int checks = 0, failures = 0;
  int tf_cnt;

  always #5 clk = ~clk;

  control_unit dut (.*);

  // transfer function stand-in: done DIV_CYCLES edges after the start edge
  always_ff @(posedge clk) begin
    if (clr) begin
      tf_cnt  <= 0;
      tf_done <= 1'b0;
    end else begin
      tf_done <= 1'b0;
      if (tf_start) tf_cnt <= DIV_CYCLES;
      else if (tf_cnt > 0) begin
        tf_cnt <= tf_cnt - 1;
        if (tf_cnt == 1) tf_done <= 1'b1;
      end
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // strobes seen in the current cycle, as a 4-bit code {load,sum_en,tf_start,state_we}
  function automatic logic [3:0] strobes();
    return {load, sum_en, tf_start, state_we};
  endfunction

  task automatic expect_cycle(input logic [3:0] s, input logic b, input string what);
    checks += 2;
    if (strobes() !== s) begin
      failures++;
      $display("FAIL %s: strobes=%b expected %b", what, strobes(), s);
    end
    if (busy !== b) begin
      failures++;
      $display("FAIL %s: busy=%b expected %b", what, busy, b);
    end
  endtask

  initial begin
    clr = 1'b1; ce = 1'b0;
    @(negedge clk);
    clr = 1'b0;
    expect_cycle(4'b0000, 1'b0, "idle");
    @(negedge clk);
    expect_cycle(4'b0000, 1'b0, "idle without ce");
    // two operations with ce held high, then ce dropped during the second
    ce = 1'b1;
    @(negedge clk);
    for (int op = 0; op < 2; op++) begin
      expect_cycle(4'b1000, 1'b1, "load");
      @(negedge clk);
      expect_cycle(4'b0100, 1'b1, "sum");
      @(negedge clk);
      expect_cycle(4'b0010, 1'b1, "start");
      if (op == 1) ce = 1'b0;
      for (int k = 1; k <= DIV_CYCLES; k++) begin
        @(negedge clk);
        expect_cycle(4'b0000, 1'b1, "wait");
      end
      @(negedge clk);
      expect_cycle(4'b0001, 1'b1, "write");
      @(negedge clk);
    end
    expect_cycle(4'b0000, 1'b0, "idle after ce dropped");
    // clear in the middle of an operation
    ce = 1'b1;
    @(negedge clk);
    @(negedge clk);
    clr = 1'b1; ce = 1'b0;
    @(negedge clk);
    clr = 1'b0;
    expect_cycle(4'b0000, 1'b0, "idle after clear");
    repeat (DIV_CYCLES + 3) begin
      @(negedge clk);
      expect_cycle(4'b0000, 1'b0, "stays idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
