// tb_nn_top: end-to-end test of the 4-4-1 network at its default size.
//
// Phase 1 loads the published trained weights and runs the 16 input patterns one
// operation each (CE pulse), checking the hidden outputs, out_value and OUTN against an
// exact model of the network and the CE-to-result latency (18 falling edges: IDLE, the
// hidden neuron's 3 + FB edges, the start of the output neuron and its 1 + 3 + FB edges).
// It also reports how many patterns agree with the published target table
// (OUTN = X3 or X4, with INP1 = X4 ... INP4 = X1); that count is information only.
// Phase 2 holds CE high with inputs changing at every hidden result and random weights
// reloaded every 16 results: each OUTN is matched to its input pattern and weights
// through queues, and results must come every 4 + FB = 8 cycles. Phase 3 drops CE (the network stops, outputs hold) and phase 4
// pulses CLR in the middle of an operation (everything reads zero, no result appears).
// Every mechanism must have happened at least once: single operation, continuous
// operation, weight reload, CE stall, clear, hidden outputs saturated at 000 and 0F0,
// negative and positive net inputs, and OUTN at both 0 and 1.
module tb_nn_top;
  import nn_pkg::*;
  import nn_ref_pkg::*;

  logic    clk = 1'b0;
  logic    clr, ce;
  logic    inp   [N_IN];
  weight_t hid_w [N_HID][N_IN];
  weight_t hid_b [N_HID];
  weight_t out_w [N_HID];
  weight_t out_b;
  nout_t   hid_out [N_HID];
  nout_t   out_value;
  logic    outn, out_valid, busy;

  int checks = 0, failures = 0;
  int n_single = 0, n_contin = 0, n_reload = 0, n_stall = 0, n_clear = 0;
  int n_sat0 = 0, n_sat1 = 0, n_neg = 0, n_pos = 0, n_out0 = 0, n_out1 = 0;
  int table_agree = 0;

  always #5 clk = ~clk;

  nn_top dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef longint hid_t [N_HID];
  typedef logic [N_HID-1:0][15:0] hid_pk_t;   // hidden results, packed for a queue

  function automatic hid_pk_t pack(input hid_t h);
    hid_pk_t v;
    for (int n = 0; n < int'(N_HID); n++) v[n] = 16'(h[n]);
    return v;
  endfunction
  typedef struct {
    hid_t   h;
    longint y;
  } expect_t;

  // exact model of one network evaluation for the current ports
  function automatic expect_t model();
    expect_t e;
    longint x, xo;
    xo = s9(out_b) * 256;
    for (int n = 0; n < int'(N_HID); n++) begin
      x = s9(hid_b[n]);
      for (int j = 0; j < int'(N_IN); j++) x += longint'(inp[j]) * s9(hid_w[n][j]);
      e.h[n] = neuron_ref(x, 0, FB);
      xo += e.h[n] * s9(out_w[n]);
    end
    e.y = neuron_ref(xo, 8, FB);
    return e;
  endfunction

  // coverage of the arithmetic cases in one expected result
  task automatic note(input expect_t e);
    for (int n = 0; n < int'(N_HID); n++) begin
      if (e.h[n] == 0)     n_sat0++;
      if (e.h[n] == 'h0F0) n_sat1++;
      if (e.h[n] < 'h080)  n_neg++;
      else                 n_pos++;
    end
    if (e.y >= 'h080) n_out1++;
    else              n_out0++;
  endtask

  task automatic compare(input expect_t e, input bit with_hidden, input string what);
    checks += 2;
    if (longint'(out_value) != e.y) begin
      failures++;
      $display("FAIL %s: out_value=%h expected %h", what, out_value, e.y);
    end
    if (outn !== (e.y >= 'h080)) begin
      failures++;
      $display("FAIL %s: outn=%0b expected %0b", what, outn, e.y >= 'h080);
    end
    if (with_hidden) begin
      for (int n = 0; n < int'(N_HID); n++) begin
        checks++;
        if (longint'(hid_out[n]) != e.h[n]) begin
          failures++;
          $display("FAIL %s: hid_out[%0d]=%h expected %h", what, n, hid_out[n], e.h[n]);
        end
      end
    end
    note(e);
  endtask

  task automatic random_weights();
    for (int n = 0; n < int'(N_HID); n++) begin
      for (int j = 0; j < int'(N_IN); j++) hid_w[n][j] = weight_t'($urandom);
      hid_b[n] = weight_t'($urandom);
      out_w[n] = weight_t'($signed(6'($urandom)));
    end
    out_b = weight_t'($signed(5'($urandom)));
  endtask

  initial begin
    expect_t e;
    expect_t q [$];
    hid_pk_t qh [$];
    hid_pk_t hp;
    longint  xo;
    int      n_hv = 0;
    int lat, since;
    clr = 1'b1; ce = 1'b0;
    for (int j = 0; j < int'(N_IN); j++) inp[j] = 1'b0;
    hid_w = HID_W_TRAINED;
    hid_b = HID_B_TRAINED;
    out_w = OUT_W_TRAINED;
    out_b = OUT_B_TRAINED;
    repeat (2) @(negedge clk);
    clr = 1'b0;

    // phase 1: trained weights, the 16 patterns, one operation each
    for (int pat = 0; pat < 16; pat++) begin
      inp[0] = pat[3]; inp[1] = pat[2]; inp[2] = pat[1]; inp[3] = pat[0];
      e = model();
      ce = 1'b1;
      @(negedge clk);
      ce = 1'b0; lat = 1;
      while (!out_valid && lat < 200) begin
        @(negedge clk);
        lat++;
      end
      compare(e, 1'b1, $sformatf("pattern %0d", pat));
      checks++;
      if (lat != 18) begin
        failures++;
        $display("FAIL pattern %0d: latency %0d expected 18", pat, lat);
      end
      if (outn == (pat[3] | pat[2])) table_agree++;
      $display("pattern X4..X1=%4b: hidden %h %h %h %h  out_value %h  OUTN %0b",
               4'(pat), hid_out[0], hid_out[1], hid_out[2], hid_out[3], out_value, outn);
      n_single++;
    end
    $display("published target table: %0d of 16 patterns agree", table_agree);

    // phase 2: CE held high, new weights every 16 results and new inputs at every
    // hidden sampling cycle (the cycle in which a hidden result pulse is high)
    e = model();
    qh.push_back(pack(e.h));
    ce = 1'b1;
    since = -1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      if (out_valid) begin
        if (q.size() == 0) begin
          failures++;
          $display("FAIL unexpected result");
        end else begin
          e = q.pop_front();
          compare(e, 1'b0, $sformatf("continuous %0d (reloads %0d)", n_contin, n_reload));
          n_contin++;
        end
        if (since >= 0) begin
          checks++;
          if (since != 8) begin
            failures++;
            $display("FAIL result period %0d expected 8", since);
          end
        end
        since = 0;
      end
      if (since >= 0) since++;
      if (dut.hid_valid[0]) begin
        // the hidden layer samples inp and its weights at the end of this cycle, and the
        // output neuron samples the previous pattern's hidden outputs and out_w/out_b at
        // the end of the next one
        n_hv++;
        if (n_hv % 16 == 0) begin
          random_weights();
          n_reload++;
        end
        if (qh.size() > 0) begin
          hp = qh.pop_front();
          xo = s9(out_b) * 256;
          for (int n = 0; n < int'(N_HID); n++) begin
            e.h[n] = longint'(hp[n]);
            xo += e.h[n] * s9(out_w[n]);
          end
          e.y = neuron_ref(xo, 8, FB);
          q.push_back(e);
        end
        for (int j = 0; j < int'(N_IN); j++) inp[j] = 1'($urandom);
        e = model();
        qh.push_back(pack(e.h));
      end
    end

    // phase 3: CE low, the network finishes and stops with its outputs held
    ce = 1'b0;
    repeat (40) @(negedge clk);
    e.y = longint'(out_value);
    for (int j = 0; j < int'(N_IN); j++) inp[j] = ~inp[j];
    repeat (40) @(negedge clk);
    checks += 2;
    if (busy || out_valid) begin
      failures++;
      $display("FAIL network still working with CE low");
    end
    if (longint'(out_value) != e.y) begin
      failures++;
      $display("FAIL output changed with CE low");
    end else n_stall++;

    // phase 4: clear in the middle of an operation
    ce = 1'b1;
    repeat (5) @(negedge clk);
    ce = 1'b0; clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    repeat (30) begin
      @(negedge clk);
      checks++;
      if (out_valid || busy || out_value != '0 || hid_out[0] != '0) begin
        failures++;
        $display("FAIL state after clear");
      end
    end
    n_clear++;

    $display("mechanisms: single=%0d continuous=%0d reload=%0d stall=%0d clear=%0d sat0=%0d sat1=%0d neg=%0d pos=%0d outn0=%0d outn1=%0d",
             n_single, n_contin, n_reload, n_stall, n_clear, n_sat0, n_sat1, n_neg, n_pos, n_out0, n_out1);
    checks++;
    if (n_single == 0 || n_contin == 0 || n_reload == 0 || n_stall == 0 || n_clear == 0 ||
        n_sat0 == 0 || n_sat1 == 0 || n_neg == 0 || n_pos == 0 || n_out0 == 0 || n_out1 == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
