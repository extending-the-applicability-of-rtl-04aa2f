// tb_ps_scan_array: self-checking test of the parallel-serial scan array at
// its default size, four chains of four cells without transformation gates.
//
// A test vector is given per chain and cell; a slice is the set of cells at
// the same distance from the heads. Slices are loaded from the farthest one
// (cell L-1) to the head slice (cell 0). A slice is one broadcast of the value
// wanted by the last chain, followed, if other chains want a different
// value, by serial shifts along the head cells for chains 0..m-1.
// Checks:
//  - the worked example (slices, head first: 1111, 0100, 1111, 0000): six
//    clocks instead of the sixteen of a fully serial load, and the right
//    content;
//  - random vectors: the content is right and the clock count equals the sum
//    over slices of N-k+1 (k = length of the run of equal values at the end
//    of the slice), which is 1 for a uniform slice;
//  - capture, and unload through the chain tails.
module tb_ps_scan_array;
  import ps_scan_pkg::*;

  localparam int N = 4;
  localparam int L = 4;

  typedef logic [N-1:0][L-1:0] vec_t;

  logic      clk = 1'b0;
  scan_op_e  op;
  logic      scan_in;
  vec_t      func_d, q;
  logic [N-1:0] scan_out;
  int        checks = 0, failures = 0;
  int        cycles = 0;
  int        n_serial = 0, n_parallel = 0;

  ps_scan_array dut (.clk, .op, .scan_in, .func_d, .q, .scan_out);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  task automatic step(input scan_op_e o, input logic d);
    op = o; scan_in = d;
    if (o == SCAN_SERIAL)   n_serial++;
    if (o == SCAN_PARALLEL) n_parallel++;
    @(negedge clk);
  endtask

  // Drive one vector slice by slice.
  task automatic load(input vec_t v);
    for (int p = L - 1; p >= 0; p--) begin
      logic b = v[N-1][p];
      int   m = 0;
      for (int i = 0; i < N; i++) if (v[i][p] != b) m = i + 1;
      step(SCAN_PARALLEL, b);
      for (int i = m - 1; i >= 0; i--) step(SCAN_SERIAL, v[i][p]);
    end
    op = SCAN_HOLD;
  endtask

  // Expected clocks: per slice N-k+1, k = trailing run of equal values.
  function automatic int expected_clocks(vec_t v);
    int total = 0;
    for (int p = 0; p < L; p++) begin
      int k = 1;
      while (k < N && v[N-1-k][p] == v[N-1][p]) k++;
      total += (k == N) ? 1 : N - k + 1;
    end
    return total;
  endfunction

  initial begin
    vec_t v, prev;
    int c0;
    op = SCAN_HOLD; scan_in = 0; func_d = '0;
    @(negedge clk);

    // Worked example. v[chain][cell]; cell 0 = slice 1.
    for (int i = 0; i < N; i++) begin
      v[i][3] = 1'b0;            // slice 4
      v[i][2] = 1'b1;            // slice 3
      v[i][1] = (i == 1);        // slice 2: 0 1 0 0
      v[i][0] = 1'b1;            // slice 1
    end
    c0 = cycles;
    load(v);
    check(cycles - c0 == 6, $sformatf("example takes 6 clocks, took %0d", cycles - c0));
    check(q == v, "example content");
    check(q[0] == 4'b0101 && q[1] == 4'b0111 && q[2] == 4'b0101 && q[3] == 4'b0101,
          "example content, hand-worked");

    // Random vectors, biased towards uniform slices.
    for (int n = 0; n < 300; n++) begin
      for (int p = 0; p < L; p++) begin
        logic b;
        int mode;
        b = 1'($urandom);
        mode = $urandom_range(0, 2);
        for (int i = 0; i < N; i++) v[i][p] = (mode == 0) ? 1'($urandom) : b;
      end
      c0 = cycles;
      load(v);
      check(q == v, $sformatf("random vector %0d content", n));
      check(cycles - c0 == expected_clocks(v), $sformatf("random vector %0d clocks", n));
    end

    // Serial mode moves only the head cells, along the chains.
    prev = q;
    step(SCAN_SERIAL, 1'b1);
    for (int i = 0; i < N; i++) begin
      check(q[i][L-1:1] == prev[i][L-1:1], "serial mode holds the bodies");
      check(q[i][0] == ((i == 0) ? 1'b1 : prev[i-1][0]), "serial mode shifts the heads");
    end

    // Capture and unload.
    for (int i = 0; i < N; i++) func_d[i] = L'($urandom);
    step(SCAN_CAPTURE, 1'b0);
    check(q == func_d, "capture");
    prev = func_d;
    for (int t = 0; t < L; t++) begin
      for (int i = 0; i < N; i++)
        check(scan_out[i] == prev[i][L-1-t], $sformatf("unload chain %0d bit %0d", i, t));
      step(SCAN_PARALLEL, 1'b0);
    end

    check(n_serial > 0 && n_parallel > 0, "both modes used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
