// tb_ps_scan_top_full: the scan structure at its default configuration,
// four chains of four cells without transformation gates, driven only
// through the one-pin test stream.
//
// First the worked example of the design (slices, head first: 1111, 0100,
// 1111, 0000): it must take 6 scan clocks, against 16 for a fully serial
// load, and 13 stream bits (three 2-bit parallel records, and for slice 2 a
// parallel record plus a serial record of 1 + 2 + 2 bits). Then random
// vectors with a mix of uniform and conflicting slices, checked for content,
// scan clocks and stream bits against formulas of the test bench's own, and
// finally a capture and unload. Every mechanism (broadcast-only vector,
// serial slice patching, capture, unload) is counted and must occur.
module tb_ps_scan_top_full;
  import ps_scan_pkg::*;

  localparam int N = 4;
  localparam int L = 4;
  localparam int W = 2;   // clog2(N) count bits

  typedef logic [N-1:0][L-1:0] vec_t;

  localparam logic [N-1:0][L-1:0][L-1:0] TAPS = '0;
  localparam logic [N-1:0][L-1:0]         INV  = '0;

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
  int n_parallel_only = 0, n_serial_slices = 0, n_capture = 0, n_unload = 0;

  ps_scan_top dut (
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
    if (exp_clk == L) n_parallel_only++;
  endtask

  initial begin
    vec_t tgt, s, st;
    rst_n = 1'b0; scan_en = 1'b0; tdi = 1'b0; func_d = '0;
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Worked example. tgt[chain][cell]; cell 0 = slice 1.
    begin
      int c0, b0;
      for (int i = 0; i < N; i++) begin
        tgt[i][3] = 1'b0;
        tgt[i][2] = 1'b1;
        tgt[i][1] = (i == 1);
        tgt[i][0] = 1'b1;
      end
      c0 = scan_clocks; b0 = stream_bits;
      apply_target(tgt, "worked example");
      check(scan_clocks - c0 == 6, "worked example: 6 scan clocks");
      check(stream_bits - b0 == 13, "worked example: 13 stream bits");
      check(q[0] == 4'b0101 && q[1] == 4'b0111 && q[2] == 4'b0101 && q[3] == 4'b0101,
            "worked example: hand-worked content");
    end

    // Arbitrary vectors: the slices the gates cannot make uniform go serial.
    for (int n = 0; n < 300; n++) begin
      for (int p = 0; p < L; p++) begin
        logic b;
        int mode;
        b = 1'($urandom);
        mode = $urandom_range(0, 2);
        for (int i = 0; i < N; i++) tgt[i][p] = (mode == 0) ? 1'($urandom) : b;
      end
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

    $display("mechanisms: vectors loaded by broadcast only=%0d serial slices=%0d capture=%0d unload shifts=%0d",
             n_parallel_only, n_serial_slices, n_capture, n_unload);
    check(n_parallel_only > 0, "a vector was loaded by broadcast only");
    check(n_serial_slices > 0, "serial slice patching happened");
    check(n_capture > 0, "capture happened");
    check(n_unload > 0, "unload happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
