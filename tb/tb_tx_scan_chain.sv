// tb_tx_scan_chain: self-checking test of one transformed scan chain at its
// default size (five cells, XOR gates cell0 -> cell2 and cell1 -> cell4).
//
// Checks:
//  - the worked example: shifting the stimulus 11010 loads 11111, in exactly
//    L = 5 broadcast clocks;
//  - random target vectors: the stimulus is derived from the target by
//    inverting an independent model of the gates (S = I x T^-1, solved bit by
//    bit because the transformation is triangular), shifted in, and the
//    chain must then hold the target;
//  - serial mode changes only the head cell, capture loads func_d, hold keeps
//    everything, scan_out is the tail during unload.
// Stimulus is driven on the falling clock edge, results sampled after it.
module tb_tx_scan_chain;
  import ps_scan_pkg::*;

  localparam int L = 5;

  logic           clk = 1'b0;
  scan_op_e       op;
  logic           bcast_in, ser_in;
  logic [L-1:0]   func_d, q;
  logic           head_out, scan_out;
  int             checks = 0, failures = 0;
  int             cycles = 0;

  tx_scan_chain dut (
    .clk, .op, .bcast_in, .ser_in, .func_d, .q, .head_out, .scan_out
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Independent model of the example chain's shift step.
  function automatic logic [L-1:0] ref_shift(logic [L-1:0] c, logic b);
    logic [L-1:0] n;
    n[0] = b;
    n[1] = c[0];
    n[2] = c[1] ^ c[0];
    n[3] = c[2];
    n[4] = c[3] ^ c[1];
    return n;
  endfunction

  // Content after shifting stimulus s (s[k] is shifted in at step L-1-k),
  // starting from an all-zero chain.
  function automatic logic [L-1:0] ref_load(logic [L-1:0] s);
    logic [L-1:0] c = '0;
    for (int t = 0; t < L; t++) c = ref_shift(c, s[L-1-t]);
    return c;
  endfunction

  // Stimulus that loads target v: cell j depends only on s[0..j].
  function automatic logic [L-1:0] ref_stimulus(logic [L-1:0] v);
    logic [L-1:0] s = '0;
    for (int j = 0; j < L; j++) begin
      logic [L-1:0] part = ref_load(s);
      s[j] = v[j] ^ part[j];
    end
    return s;
  endfunction

  task automatic step(input scan_op_e o, input logic b, input logic si);
    op = o; bcast_in = b; ser_in = si;
    @(negedge clk);
  endtask

  task automatic shift_in(input logic [L-1:0] s);
    for (int t = 0; t < L; t++) step(SCAN_PARALLEL, s[L-1-t], 1'b0);
    op = SCAN_HOLD;
  endtask

  initial begin
    logic [L-1:0] tgt, stim, prev, resp;
    logic si;
    int c0;
    op = SCAN_HOLD; bcast_in = 0; ser_in = 0; func_d = '0;
    @(negedge clk);

    // Clear, so the worked example starts from known content.
    func_d = '0;
    step(SCAN_CAPTURE, 0, 0);
    check(q == '0, "capture of zeros");

    // Worked example: stimulus 11010 (cell 0 first) loads 11111.
    c0 = cycles;
    shift_in(5'b01011);
    check(cycles - c0 == L, "load takes L clocks");
    check(q == 5'b11111, $sformatf("example 11010 -> 11111, got q=%b", q));
    check(ref_stimulus(5'b11111) == 5'b01011, "reference inverse of example");

    // Random targets through the inverse transformation.
    for (int n = 0; n < 200; n++) begin
      tgt  = L'($urandom);
      stim = ref_stimulus(tgt);
      shift_in(stim);
      check(q == tgt, $sformatf("target %b stimulus %b got %b", tgt, stim, q));
    end

    // Serial mode touches only the head cell.
    for (int n = 0; n < 20; n++) begin
      si = 1'($urandom);
      prev = q;
      step(SCAN_SERIAL, ~si, si);
      check(q == {prev[L-1:1], si}, "serial mode changes only the head");
      check(head_out == q[0], "head_out is the head cell");
    end

    // Hold.
    prev = q;
    repeat (3) step(SCAN_HOLD, 1'b1, 1'b1);
    check(q == prev, "hold keeps the chain");

    // Capture a response and unload it: scan_out follows the model.
    resp = L'($urandom);
    func_d = resp;
    step(SCAN_CAPTURE, 0, 0);
    check(q == resp, "capture loads func_d");
    prev = resp;
    for (int t = 0; t < L; t++) begin
      check(scan_out == prev[L-1], $sformatf("unload bit %0d", t));
      step(SCAN_PARALLEL, 1'b0, 1'b0);
      prev = ref_shift(prev, 1'b0);
      check(q == prev, $sformatf("unload shift %0d", t));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
