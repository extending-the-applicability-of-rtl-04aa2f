// ps_scan_top: the complete parallel-serial scan structure of a circuit under
// test with one scan-input pin.
//
// The tester drives one bit per clock on tdi while scan_en = 1. The
// stream decoder (scan_stream_decoder) reads the configuration selection bit
// of each record and turns parallel records into broadcast shifts and serial
// records into shifts along the head cells of the N chains
// (ps_scan_array). Each chain may carry serial transformation gates (TAPS,
// INV), chosen so that a given test vector becomes a stimulus whose slices
// are uniform, and thus loadable by broadcasts; slices the transformation
// cannot make uniform are patched in serial mode. scan_en = 0 for one clock
// captures the circuit's response (func_d) into all cells; the response
// leaves on scan_out[N-1:0], one chain tail per pin, during the broadcast
// shifts of the next vector.
//
// The combinational circuit under test is outside this module: func_d are its
// next-state values and q the scan-cell contents it reads.
// ctrl_op/ctrl_data show the scan operation of the current clock.
// Defaults: N = 4 chains of L = 4 cells (the worked example of the design's
// description), no transformation gates.
module ps_scan_top
  import ps_scan_pkg::*;
#(
  parameter int unsigned N = 4,
  parameter int unsigned L = 4,
  parameter logic [N-1:0][L-1:0][L-1:0] TAPS = '0,
  parameter logic [N-1:0][L-1:0]         INV  = '0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                scan_en,
  input  logic                tdi,
  input  logic [N-1:0][L-1:0] func_d,
  output logic [N-1:0][L-1:0] q,
  output logic [N-1:0]        scan_out,
  output scan_op_e            ctrl_op,
  output logic                rec_done
);

  scan_ctrl_t ctrl;

  scan_stream_decoder #(.N(N)) u_dec (
    .clk      (clk),
    .rst_n    (rst_n),
    .scan_en  (scan_en),
    .tdi      (tdi),
    .ctrl     (ctrl),
    .rec_done (rec_done)
  );

  ps_scan_array #(
    .N    (N),
    .L    (L),
    .TAPS (TAPS),
    .INV  (INV)
  ) u_array (
    .clk      (clk),
    .op       (ctrl.op),
    .scan_in  (ctrl.data),
    .func_d   (func_d),
    .q        (q),
    .scan_out (scan_out)
  );

  assign ctrl_op = ctrl.op;

endmodule
