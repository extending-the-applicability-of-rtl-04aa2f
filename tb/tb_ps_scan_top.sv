// tb_ps_scan_top: end-to-end test of the scan structure with serial
// transformation gates, driven only through the one-pin test stream.
//
// Configuration: three chains of six cells.
//   chain 0: XOR gates cell0 -> cell2 and cell1 -> cell4
//   chain 1: XOR gate cell2 -> cell5, inverter into cell 3
//   chain 2: no gates
// The test bench keeps its own model of the gates (one shift step per
// chain). For a target vector I it derives each chain's stimulus
// S_i = I_i x T_i^-1 bit by bit (the transformation is triangular), then
// encodes S slice by slice into stream records: a parallel record with the
// value of the last chain, and a serial record for the leading chains that
// differ. It checks the loaded content, the number of scan clocks, and the
// number of stream bits against formulas of its own.
// Mechanisms counted, each must occur: broadcast-only vectors made possible
// by the transformation although their slices conflict, serial patching of
// slices, capture, unload through the transformed chains.
module tb_ps_scan_top;
  import ps_scan_pkg::*;

  localparam int N = 3;
  localparam int L = 6;
  localparam int W = 2;   // clog2(N) count bits

  typedef logic [N-1:0][L-1:0] vec_t;

  localparam logic [N-1:0][L-1:0][L-1:0] TAPS = {
    36'h0,                                              // chain 2
    (36'(1) << (5*L + 2)),                              // chain 1
    (36'(1) << (2*L + 0)) | (36'(1) << (4*L + 1))       // chain 0
  };
  localparam logic [N-1:0][L-1:0] INV = {6'b000000, 6'b001000, 6'b000000};

  logic         clk = 1'b0;
  logic         rst_n;
  logic         scan_en;
  logic         tdi;
  vec_t         func_d, q;
  logic [N-1:0] scan_out;
  scan_op_e     ctrl_op;
  logic         rec_done;

  int checks = 0, failures = 0;
  int scan_clocks = 0, stream_bits = 0;
  int n_parallel_only_conflict = 0, n_serial_slices = 0, n_capture = 0, n_unload = 0;

  ps_scan_top #(.N(N), .L(L), .TAPS(TAPS), .INV(INV)) dut (
    .clk, .rst_n, .scan_en, .tdi, .func_d, .q, .scan_out, .ctrl_op, .rec_done
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  // ---- model of the transformed chains ----
  function automatic logic [L-1:0] ref_shift(int i, logic [L-1:0] c, logic b);
    logic [L-1:0] n;
    n[0] = b;
    for (int j = 1; j < L; j++) begin
      n[j] = c[j-1] ^ INV[i][j];
      for (int k = 0; k < L; k++) if (TAPS[i][j][k]) n[j] ^= c[k];
    end
    return n;
  endfunction

  function automatic logic [L-1:0] ref_load(int i, logic [L-1:0] s);
    logic [L-1:0] c = '0;
    for (int t = 0; t < L; t++) c = ref_shift(i, c, s[L-1-t]);
    return c;
  endfunction

  function automatic logic [L-1:0] ref_stimulus(int i, logic [L-1:0] v);
    logic [L-1:0] s = '0;
    for (int j = 0; j < L; j++) begin
      logic [L-1:0] part = ref_load(i, s);
      s[j] = v[j] ^ part[j];
    end
    return s;
  endfunction

  // ---- stream driving ----
  task automatic send(input logic d);
    scan_en = 1'b1; tdi = d; stream_bits++;
    #1;
    if (ctrl_op == SCAN_PARALLEL || ctrl_op == SCAN_SERIAL) scan_clocks++;
    @(negedge clk);
  endtask

  // Load stimulus s; returns through the counters. Expected scan clocks and
  // stream bits are computed separately by the caller.
  task automatic load_stimulus(input vec_t s);
    for (int p = L - 1; p >= 0; p--) begin
      logic b = s[N-1][p];
      int   m = 0;
      for (int i = 0; i < N; i++) if (s[i][p] != b) m = i + 1;
      send(1'b0); send(b);
      if (m > 0) begin
        n_serial_slices++;
        send(1'b1);
        for (int k = W - 1; k >= 0; k--) send(m[k]);
        for (int i = m - 1; i >= 0; i--) send(s[i][p]);
      end
    end
  endtask

  function automatic int slice_extra(vec_t s, int p);
    int k = 1;
    while (k < N && s[N-1-k][p] == s[N-1][p]) k++;
    return N - k;   // serial shifts for this slice
  endfunction

  function automatic bit has_conflict(vec_t v);
    for (int p = 0; p < L; p++)
      for (int i = 0; i < N; i++) if (v[i][p] != v[0][p]) return 1'b1;
    return 1'b0;
  endfunction

  task automatic apply_target(input vec_t tgt, input string tag);
    vec_t s;
    int c0, b0, exp_clk, exp_bits, extra;
    for (int i = 0; i < N; i++) s[i] = ref_stimulus(i, tgt[i]);
    exp_clk = 0; exp_bits = 0;
    for (int p = 0; p < L; p++) begin
      extra = slice_extra(s, p);
      exp_clk  += 1 + extra;
      exp_bits += 2 + ((extra > 0) ? 1 + W + extra : 0);
    end
    c0 = scan_clocks; b0 = stream_bits;
    load_stimulus(s);
    scan_en = 1'b1; tdi = 1'b0;
    check(q == tgt, $sformatf("%s: content", tag));
    check(scan_clocks - c0 == exp_clk, $sformatf("%s: scan clocks %0d expected %0d",
                                                 tag, scan_clocks - c0, exp_clk));
    check(stream_bits - b0 == exp_bits, $sformatf("%s: stream bits", tag));
    if (exp_clk == L && has_conflict(tgt)) n_parallel_only_conflict++;
  endtask

  initial begin
    vec_t tgt, s, st;
    rst_n = 1'b0; scan_en = 1'b0; tdi = 1'b0; func_d = '0;
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Vectors whose stimulus is uniform: the gates turn broadcast data into
    // conflicting slices, loaded in L clocks.
    for (int n = 0; n < 50; n++) begin
      logic [L-1:0] u;
      u = L'($urandom);
      for (int i = 0; i < N; i++) tgt[i] = ref_load(i, u);
      apply_target(tgt, $sformatf("uniform stimulus %0d", n));
    end

    // Arbitrary vectors: the slices the gates cannot make uniform go serial.
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < N; i++) tgt[i] = L'($urandom);
      apply_target(tgt, $sformatf("random vector %0d", n));
    end

    // Capture a response, then unload it through the chain tails.
    for (int i = 0; i < N; i++) func_d[i] = L'($urandom);
    scan_en = 1'b0;
    @(negedge clk);
    n_capture++;
    check(q == func_d, "capture");
    st = func_d;
    for (int t = 0; t < L; t++) begin
      send(1'b0);                 // configuration bit: chains hold
      for (int i = 0; i < N; i++)
        check(scan_out[i] == st[i][L-1], $sformatf("unload chain %0d bit %0d", i, t));
      send(1'b0);                 // broadcast 0: chains shift
      for (int i = 0; i < N; i++) st[i] = ref_shift(i, st[i], 1'b0);
      check(q == st, $sformatf("unload step %0d", t));
      n_unload++;
    end

    $display("mechanisms: conflicting vectors loaded by broadcast only=%0d serial slices=%0d capture=%0d unload shifts=%0d",
             n_parallel_only_conflict, n_serial_slices, n_capture, n_unload);
    check(n_parallel_only_conflict > 0, "transformation made a conflicting vector broadcast-only");
    check(n_serial_slices > 0, "serial slice patching happened");
    check(n_capture > 0, "capture happened");
    check(n_unload > 0, "unload happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
