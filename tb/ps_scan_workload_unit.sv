// ps_scan_workload_unit: test-bench helper that runs one benchmark-sized
// configuration of the scan structure (N chains of L cells) end to end and
// reports its check counts. Used by tb_ps_scan_workloads.
//
// Each chain gets a few XOR gates placed by a fixed formula: in chain i, cell
// j receives a gate from cell k = (i + j) mod (j - 1) (always k <= j-2) when
// (7*i + 3*j) mod 5 == 0, so the configuration has transformations without
// any data file. Two kinds of
// vector are applied, both through the one-pin stream:
//  - vectors whose stimulus is uniform (what the transformation-based
//    method aims for): they must load in L scan clocks;
//  - vectors with a given number of conflicting slices, standing for the
//    vectors that a parallel-only scheme must load fully serially.
// Every vector is checked for content, scan clocks and stream bits; the
// unit also prints the scan clocks against the N*L clocks of a fully
// serial load.
module ps_scan_workload_unit
  import ps_scan_pkg::*;
#(
  parameter int N        = 10,
  parameter int L        = 67,
  parameter int VECTORS  = 10,
  parameter int CONFLICT_SLICES = 4,
  parameter string NAME  = "workload"
) (
  input  logic clk,
  input  logic start,
  output int   checks,
  output int   failures,
  output logic done
);

  localparam int W = (N > 2) ? $clog2(N) : 1;

  typedef logic [N-1:0][L-1:0] vec_t;

  function automatic logic [N-1:0][L-1:0][L-1:0] make_taps();
    logic [N-1:0][L-1:0][L-1:0] t = '0;
    for (int i = 0; i < N; i++)
      for (int j = 2; j < L; j++)
        if ((7*i + 3*j) % 5 == 0) t[i][j] = L'(1) << ((i + j) % (j - 1));
    return t;
  endfunction

  localparam logic [N-1:0][L-1:0][L-1:0] TAPS = make_taps();

  logic         rst_n;
  logic         scan_en;
  logic         tdi;
  vec_t         func_d, q;
  logic [N-1:0] scan_out;
  scan_op_e     ctrl_op;
  logic         rec_done;

  int scan_clocks = 0, stream_bits = 0;
  int tap_of[N][L];   // the one tapped cell feeding cell j of chain i, or -1

  ps_scan_top #(.N(N), .L(L), .TAPS(TAPS)) dut (
    .clk, .rst_n, .scan_en, .tdi, .func_d, .q, .scan_out, .ctrl_op, .rec_done
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: %s", NAME, what);
    end
  endtask

  function automatic logic [L-1:0] ref_shift(int i, logic [L-1:0] c, logic b);
    logic [L-1:0] n;
    n[0] = b;
    for (int j = 1; j < L; j++) begin
      n[j] = c[j-1];
      if (tap_of[i][j] >= 0) n[j] ^= c[tap_of[i][j]];
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

  task automatic send(input logic d);
    scan_en = 1'b1; tdi = d; stream_bits++;
    #1;
    if (ctrl_op == SCAN_PARALLEL || ctrl_op == SCAN_SERIAL) scan_clocks++;
    @(negedge clk);
  endtask

  task automatic apply_target(input vec_t tgt, input string tag);
    vec_t s;
    int c0, b0, exp_clk, exp_bits;
    for (int i = 0; i < N; i++) s[i] = ref_stimulus(i, tgt[i]);
    exp_clk = 0; exp_bits = 0;
    for (int p = 0; p < L; p++) begin
      int k = 1;
      while (k < N && s[N-1-k][p] == s[N-1][p]) k++;
      exp_clk  += 1 + (N - k);
      exp_bits += 2 + ((k < N) ? 1 + W + (N - k) : 0);
    end
    c0 = scan_clocks; b0 = stream_bits;
    for (int p = L - 1; p >= 0; p--) begin
      logic b;
      int   m;
      b = s[N-1][p];
      m = 0;
      for (int i = 0; i < N; i++) if (s[i][p] != b) m = i + 1;
      send(1'b0); send(b);
      if (m > 0) begin
        send(1'b1);
        for (int k = W - 1; k >= 0; k--) send(m[k]);
        for (int i = m - 1; i >= 0; i--) send(s[i][p]);
      end
    end
    check(q == tgt, $sformatf("%s: content", tag));
    check(scan_clocks - c0 == exp_clk, $sformatf("%s: scan clocks", tag));
    check(stream_bits - b0 == exp_bits, $sformatf("%s: stream bits", tag));
    $display("%s %s: %0d scan clocks, %0d stream bits (fully serial load: %0d clocks, %0d bits)",
             NAME, tag, scan_clocks - c0, stream_bits - b0, N * L, N * L);
  endtask

  initial begin
    vec_t tgt;
    logic [L-1:0] u;
    checks = 0; failures = 0; done = 1'b0;
    rst_n = 1'b0; scan_en = 1'b0; tdi = 1'b0; func_d = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < L; j++) begin
        tap_of[i][j] = -1;
        for (int k = 0; k < L; k++)
          if (TAPS[i][j][k]) tap_of[i][j] = k;
      end
    wait (start);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    for (int n = 0; n < VECTORS; n++) begin
      for (int p = 0; p < L; p++) u[p] = 1'($urandom);
      for (int i = 0; i < N; i++) tgt[i] = ref_load(i, u);
      apply_target(tgt, $sformatf("transformable vector %0d", n));
      check(scan_clocks > 0, "scan clocks counted");
    end

    // Plain-scan view: stimulus with CONFLICT_SLICES conflicting slices.
    for (int n = 0; n < VECTORS; n++) begin
      vec_t s;
      for (int p = 0; p < L; p++) begin
        logic b;
        b = 1'($urandom);
        for (int i = 0; i < N; i++) s[i][p] = b;
      end
      for (int c = 0; c < CONFLICT_SLICES; c++) begin
        int p;
        p = $urandom_range(0, L - 1);
        for (int i = 0; i < N; i++) s[i][p] = 1'($urandom);
      end
      for (int i = 0; i < N; i++) tgt[i] = ref_load(i, s[i]);
      apply_target(tgt, $sformatf("vector with conflicts %0d", n));
    end

    done = 1'b1;
  end

endmodule
