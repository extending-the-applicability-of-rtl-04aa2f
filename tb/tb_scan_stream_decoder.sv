// tb_scan_stream_decoder: self-checking test of the test-stream decoder for
// four chains (two-bit serial count).
//
// Random records are built as lists of (tdi bit, expected operation,
// expected record end); the bits are driven on the falling edge and the
// decoder's outputs compared before the next rising edge. Covered: parallel
// records of both values, serial records of every count 0..N-1, a capture
// clock (scan_en = 0) that also abandons a half-received record, and the
// number of stream bits per record (2, or 1 + 2 + count for a serial record).
module tb_scan_stream_decoder;
  import ps_scan_pkg::*;

  localparam int N = 4;
  localparam int W = 2;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       scan_en;
  logic       tdi;
  scan_ctrl_t ctrl;
  logic       rec_done;
  int         checks = 0, failures = 0;
  int         n_par = 0, n_ser = 0, n_cap = 0, n_zero = 0;

  scan_stream_decoder dut (.clk, .rst_n, .scan_en, .tdi, .ctrl, .rec_done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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

  // Drive one stream bit and compare the decoder's reaction this clock.
  task automatic bit_check(input logic en, input logic d, input scan_op_e exp_op,
                           input logic exp_done);
    scan_en = en; tdi = d;
    #1;
    check(ctrl.op == exp_op, $sformatf("op %s expected %s", ctrl.op.name(), exp_op.name()));
    if (exp_op == SCAN_PARALLEL || exp_op == SCAN_SERIAL)
      check(ctrl.data == d, "data follows tdi");
    check(rec_done == exp_done, "record end flag");
    @(negedge clk);
  endtask

  task automatic par_record(input logic b);
    bit_check(1, 1'b0, SCAN_HOLD, 0);
    bit_check(1, b, SCAN_PARALLEL, 1);
    n_par++;
  endtask

  task automatic ser_record(input int cnt);
    bit_check(1, 1'b1, SCAN_HOLD, 0);
    bit_check(1, cnt[1], SCAN_HOLD, 0);
    bit_check(1, cnt[0], SCAN_HOLD, cnt == 0);
    for (int i = 0; i < cnt; i++)
      bit_check(1, 1'($urandom), SCAN_SERIAL, i == cnt - 1);
    if (cnt == 0) n_zero++;
    n_ser++;
  endtask

  initial begin
    rst_n = 0; scan_en = 0; tdi = 0;
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    bit_check(0, 1'b1, SCAN_CAPTURE, 0); n_cap++;
    par_record(1'b0);
    par_record(1'b1);
    for (int c = 0; c < N; c++) ser_record(c);
    for (int n = 0; n < 400; n++) begin
      if ($urandom_range(0, 1) == 0) par_record(1'($urandom));
      else ser_record($urandom_range(0, N - 1));
    end

    // Capture in the middle of a serial record restarts the stream.
    bit_check(1, 1'b1, SCAN_HOLD, 0);
    bit_check(1, 1'b1, SCAN_HOLD, 0);
    bit_check(0, 1'b0, SCAN_CAPTURE, 0); n_cap++;
    par_record(1'b1);
    ser_record(3);

    check(n_par > 0 && n_ser > 0 && n_cap > 0 && n_zero > 0, "all record kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
